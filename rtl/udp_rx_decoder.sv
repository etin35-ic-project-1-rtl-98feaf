// udp_rx_decoder: RX frame decoder, frame FIFO and UDP processing of the SRU
// slow-control Ethernet path (the UDP part of Fig. 4 / Fig. 7 of the design).
//
// Input: the receive byte stream of the Ethernet MAC (rx_data/rx_dv high for
// the bytes of one frame, FCS already removed, then a one-cycle rx_good_frame
// or rx_bad_frame).  The frame is written into a byte buffer while the
// decoder checks the destination MAC, EtherType 0x0800, IPv4 with a 20-byte
// header, protocol 17 (UDP) and the destination IP; udp_frame is raised once
// those match.  When a good matching frame has ended, the UDP part (UDP
// header and payload, IP total length - 20 bytes) is replayed from the
// buffer on udp_rxd with udp_rx_dv high, one byte per clock.  Then
// rx_frame_processed pulses and the decoder takes the next frame.  Frames
// that do not match, bad frames and frames arriving during a replay are
// dropped.
// The buffer holds 4096 bytes: a command packet of the maximum 500 commands
// is 4016 UDP bytes.  MAC and IP address are parameters (their values are
// this implementation's choice).  ARP and ICMP replies are not part of this
// block.
module udp_rx_decoder #(
  parameter logic [47:0] MY_MAC = 48'h00_0A_35_00_01_02,
  parameter logic [31:0] MY_IP  = {8'd10, 8'd160, 8'd1, 8'd2},
  parameter int unsigned AW     = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  rx_data,
  input  logic        rx_dv,
  input  logic        rx_good_frame,
  input  logic        rx_bad_frame,
  output logic        udp_frame,
  output logic [7:0]  udp_rxd,
  output logic        udp_rx_dv,
  output logic        rx_frame_processed,
  output logic [15:0] frames_dropped
);

  typedef enum logic [1:0] {RECV, WAIT_END, REPLAY} st_t;
  st_t st;

  logic [7:0]  buf_mem [2**AW];
  logic [15:0] cnt;         // byte index of the incoming frame
  logic        hdr_ok;      // all header fields seen so far match
  logic [15:0] ip_len;
  logic [AW-1:0] rd_addr;
  logic [15:0] remaining;
  logic [7:0]  expect_b;
  logic        check;

  // expected byte for the checked header positions
  always_comb begin
    check    = 1'b1;
    expect_b = 8'h00;
    if (cnt < 16'd6)                         expect_b = MY_MAC[8*(5 - cnt[2:0]) +: 8];
    else if (cnt == 16'd12)                  expect_b = 8'h08;
    else if (cnt == 16'd13)                  expect_b = 8'h00;
    else if (cnt == 16'd14)                  expect_b = 8'h45;
    else if (cnt == 16'd23)                  expect_b = 8'h11;
    else if (cnt >= 16'd30 && cnt < 16'd34)  expect_b = MY_IP[8*(33 - cnt[5:0]) +: 8];
    else                                     check    = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st                 <= RECV;
      cnt                <= '0;
      hdr_ok             <= 1'b1;
      ip_len             <= '0;
      rd_addr            <= '0;
      remaining          <= '0;
      udp_rx_dv          <= 1'b0;
      udp_frame          <= 1'b0;
      rx_frame_processed <= 1'b0;
      frames_dropped     <= '0;
    end else begin
      rx_frame_processed <= 1'b0;
      udp_rx_dv          <= 1'b0;
      case (st)
        RECV: begin
          if (rx_dv) begin
            if (cnt < 16'(2**AW)) buf_mem[cnt[AW-1:0]] <= rx_data;
            if (cnt != 16'hFFFF) cnt <= cnt + 16'd1;
            if (check && rx_data != expect_b) hdr_ok <= 1'b0;
            if (cnt == 16'd16) ip_len[15:8] <= rx_data;
            if (cnt == 16'd17) ip_len[7:0]  <= rx_data;
            if (cnt == 16'd33 && hdr_ok && rx_data == expect_b) udp_frame <= 1'b1;
          end
          if (rx_good_frame || rx_bad_frame) begin
            cnt    <= '0;
            hdr_ok <= 1'b1;
            if (rx_good_frame && udp_frame && ip_len >= 16'd28 &&
                {1'b0, ip_len} + 17'd14 <= {1'b0, cnt} && cnt <= 16'(2**AW)) begin
              st        <= REPLAY;
              rd_addr   <= AW'(34);
              remaining <= ip_len - 16'd20;
            end else begin
              udp_frame      <= 1'b0;
              frames_dropped <= frames_dropped + 16'd1;
            end
          end
        end
        REPLAY: begin
          if (rx_good_frame || rx_bad_frame) frames_dropped <= frames_dropped + 16'd1;
          if (remaining != 0) begin
            udp_rx_dv <= 1'b1;
            rd_addr   <= rd_addr + 1'b1;
            remaining <= remaining - 16'd1;
          end else begin
            st <= WAIT_END;
          end
        end
        WAIT_END: begin
          // wait for the last byte to leave the read pipeline
          if (!udp_rx_dv) begin
            rx_frame_processed <= 1'b1;
            udp_frame          <= 1'b0;
            st                 <= RECV;
          end
        end
        default: st <= RECV;
      endcase
    end
  end

  always_ff @(posedge clk) udp_rxd <= buf_mem[rd_addr];

endmodule
