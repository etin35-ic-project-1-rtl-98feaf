// arp_icmp_reply: ARP and ICMP echo reply path of the SRU's slow-control
// Ethernet port (ARP reply FSM, ICMP reply with checksum, IP reply mux and
// TX frame encoder in one block).
//
// Watches the same receive byte stream as udp_rx_decoder (rx_data/rx_dv,
// ending with a one-cycle rx_good_frame or rx_bad_frame) and answers:
//   ARP request  (EtherType 0x0806, Ethernet/IPv4, oper 1, target IP = MY_IP,
//                destination MAC broadcast or MY_MAC): the sender's MAC and
//                IP are kept and an ARP reply (oper 2) is sent back to them.
//   ICMP echo    (EtherType 0x0800, IPv4 without options, protocol 1, type 8,
//                destination MAC and IP ours): the frame is written into a
//                byte buffer while it arrives, and the ICMP checksum of the
//                reply (type 0, same code, identifier, sequence and payload)
//                is summed on the fly.  The reply is the buffered frame with
//                the MAC and IP addresses swapped, type 0 and the new
//                checksum; the IP header checksum does not change, since
//                swapping the addresses keeps its sum.
// A reply is only started after rx_good_frame; a bad frame cancels it.  The
// reply mux sends a pending ARP reply before a pending ICMP reply.  While an
// ICMP reply is pending or being sent, the buffer is not overwritten: further
// echo requests are dropped and counted (dropped).
// TX side: a byte stream with valid/ready (tx_valid, tx_data, tx_last on the
// final byte), as the LocalLink TX interface of the Ethernet MAC takes it;
// one byte per clock while tx_ready is high.  The ARP reply is padded with
// zeros to the 60-byte minimum frame; the MAC appends the FCS.
// Which replies exist and that ARP data come from the RX frame decoder follow
// the design description; the one-frame buffer, the ARP-first priority, the
// padding and the checksum-while-receiving scheme are this design's choices.
// Timing: the first reply byte is valid two clocks after rx_good_frame.
module arp_icmp_reply #(
  parameter logic [47:0] MY_MAC = 48'h00_0A_35_00_01_02,
  parameter logic [31:0] MY_IP  = {8'd10, 8'd160, 8'd1, 8'd2},
  parameter int unsigned AW     = 11       // echo buffer of 2048 bytes
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  rx_data,
  input  logic        rx_dv,
  input  logic        rx_good_frame,
  input  logic        rx_bad_frame,
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready,
  output logic [15:0] arp_replies,
  output logic [15:0] icmp_replies,
  output logic [15:0] dropped
);

  localparam int unsigned ARP_LEN = 60;

  typedef enum logic [1:0] {TX_IDLE, TX_ARP, TX_ICMP} tx_t;
  tx_t tx_st;

  logic [7:0]  buf_mem [2**AW];
  logic [15:0] idx;                         // byte index in the received frame
  logic        arp_ok, icmp_ok, icmp_hold;  // running checks / buffer in use
  logic        arp_pend, icmp_pend;
  logic [47:0] peer_mac, arp_mac;           // requester of the ICMP / ARP
  logic [31:0] peer_ip, arp_ip;
  logic [47:0] rx_mac_tmp, arp_sha_tmp;     // source MAC, ARP sender MAC
  logic [31:0] rx_ip_tmp;
  logic [15:0] ip_len, icmp_len;            // IP total length, frame length
  logic [31:0] csum_acc;
  logic [15:0] icmp_csum;
  logic [15:0] tx_idx, tx_len;
  logic        bcast;

  function automatic logic [15:0] fold(input logic [31:0] s);
    logic [31:0] t;
    t = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    t = {16'd0, t[15:0]} + {16'd0, t[31:16]};
    return t[15:0];
  endfunction

  // ---------------- receive: checks, capture, checksum ----------------
  logic        buf_we;
  logic [7:0]  byte_cs;                     // byte as it enters the reply sum
  assign buf_we  = rx_dv && !icmp_hold && (idx < 16'(2**AW));
  // reply type is 0 and the checksum field counts as 0 in the sum
  assign byte_cs = (idx == 16'd34 || idx == 16'd36 || idx == 16'd37) ? 8'h00 : rx_data;

  always_ff @(posedge clk) begin
    if (buf_we) buf_mem[idx[AW-1:0]] <= rx_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx          <= '0;
      arp_ok       <= 1'b1;
      icmp_ok      <= 1'b1;
      icmp_hold    <= 1'b0;
      arp_pend     <= 1'b0;
      icmp_pend    <= 1'b0;
      bcast        <= 1'b1;
      peer_mac     <= '0;
      peer_ip      <= '0;
      arp_mac      <= '0;
      arp_ip       <= '0;
      rx_mac_tmp   <= '0;
      arp_sha_tmp  <= '0;
      rx_ip_tmp    <= '0;
      ip_len       <= '0;
      icmp_len     <= '0;
      csum_acc     <= '0;
      icmp_csum    <= '0;
      dropped      <= '0;
      tx_st        <= TX_IDLE;
      tx_idx       <= '0;
      tx_len       <= '0;
      arp_replies  <= '0;
      icmp_replies <= '0;
    end else begin
      // ---- byte checks while the frame arrives ----
      if (rx_dv) begin
        idx <= idx + 16'd1;
        if (idx < 16'd6) begin
          if (rx_data != 8'hFF) bcast <= 1'b0;
          if (rx_data != MY_MAC[8*(5-idx[2:0]) +: 8]) icmp_ok <= 1'b0;
          if (rx_data != MY_MAC[8*(5-idx[2:0]) +: 8] && rx_data != 8'hFF) arp_ok <= 1'b0;
        end
        if (idx >= 16'd6 && idx < 16'd12) rx_mac_tmp <= {rx_mac_tmp[39:0], rx_data};
        case (idx)
          16'd12: begin
            if (rx_data != 8'h08) begin arp_ok <= 1'b0; icmp_ok <= 1'b0; end
            // a destination MAC of all ones is only valid for ARP
            if (bcast) icmp_ok <= 1'b0;
          end
          16'd13: begin
            if (rx_data != 8'h06) arp_ok  <= 1'b0;
            if (rx_data != 8'h00) icmp_ok <= 1'b0;
          end
          16'd14: begin
            if (rx_data != 8'h00) arp_ok  <= 1'b0;   // htype 0x0001
            if (rx_data != 8'h45) icmp_ok <= 1'b0;   // IPv4, 20-byte header
          end
          16'd15: if (rx_data != 8'h01) arp_ok <= 1'b0;
          16'd16: begin
            if (rx_data != 8'h08) arp_ok <= 1'b0;    // ptype 0x0800
            ip_len[15:8] <= rx_data;
          end
          16'd17: begin
            if (rx_data != 8'h00) arp_ok <= 1'b0;
            ip_len[7:0] <= rx_data;
          end
          16'd18: if (rx_data != 8'h06) arp_ok <= 1'b0;   // hlen
          16'd19: if (rx_data != 8'h04) arp_ok <= 1'b0;   // plen
          16'd20: if (rx_data != 8'h00) arp_ok <= 1'b0;
          16'd21: if (rx_data != 8'h01) arp_ok <= 1'b0;   // oper: request
          16'd23: if (rx_data != 8'h01) icmp_ok <= 1'b0;  // protocol ICMP
          16'd34: if (rx_data != 8'h08) icmp_ok <= 1'b0;  // echo request
          default: ;
        endcase
        // ARP: sender MAC 22-27 (arp_sha_tmp), sender IP 28-31,
        // target IP 38-41.  IPv4: source IP 26-29, destination IP 30-33.
        if (idx >= 16'd22 && idx < 16'd28) arp_sha_tmp <= {arp_sha_tmp[39:0], rx_data};
        if ((idx >= 16'd28 && idx < 16'd32)) rx_ip_tmp <= {rx_ip_tmp[23:0], rx_data};
        if (idx >= 16'd26 && idx < 16'd30) peer_ip <= icmp_hold ? peer_ip : {peer_ip[23:0], rx_data};
        if (idx >= 16'd30 && idx < 16'd34 && rx_data != MY_IP[8*(33-idx[5:0]) +: 8]) icmp_ok <= 1'b0;
        if (idx >= 16'd38 && idx < 16'd42 && rx_data != MY_IP[8*(41-idx[5:0]) +: 8]) arp_ok <= 1'b0;
        // ICMP reply checksum over the IP payload (bytes 34 .. 14+ip_len-1)
        if (idx == 16'd34) csum_acc <= '0;
        else if (idx > 16'd34 && idx < 16'd14 + ip_len)
          csum_acc <= csum_acc + (idx[0] ? {24'd0, byte_cs} : {16'd0, byte_cs, 8'd0});
      end

      // ---- end of frame ----
      if (rx_good_frame || rx_bad_frame) begin
        idx     <= '0;
        arp_ok  <= 1'b1;
        icmp_ok <= 1'b1;
        bcast   <= 1'b1;
        csum_acc <= '0;
        if (rx_good_frame && idx >= 16'd42) begin
          if (arp_ok && !arp_pend && tx_st != TX_ARP) begin
            arp_pend <= 1'b1;
            arp_mac  <= arp_sha_tmp;
            arp_ip   <= rx_ip_tmp;
          end
          if (icmp_ok && !icmp_hold) begin
            if (idx >= 16'd14 + ip_len && 16'd14 + ip_len <= 16'(2**AW) && ip_len >= 16'd28) begin
              icmp_hold <= 1'b1;
              icmp_pend <= 1'b1;
              peer_mac  <= rx_mac_tmp;
              icmp_len  <= 16'd14 + ip_len;
              icmp_csum <= ~fold(csum_acc);
            end
          end else if (icmp_ok) begin
            dropped <= dropped + 16'd1;
          end
        end
      end

      // ---- IP reply mux and TX frame encoder ----
      case (tx_st)
        TX_IDLE: begin
          tx_idx <= '0;
          if (arp_pend) begin
            tx_st    <= TX_ARP;
            tx_len   <= 16'(ARP_LEN);
          end else if (icmp_pend) begin
            tx_st    <= TX_ICMP;
            tx_len   <= icmp_len;
          end
        end
        default: if (tx_ready) begin
          tx_idx <= tx_idx + 16'd1;
          if (tx_idx == tx_len - 16'd1) begin
            tx_st <= TX_IDLE;
            if (tx_st == TX_ARP) begin
              arp_pend    <= 1'b0;
              arp_replies <= arp_replies + 16'd1;
            end else begin
              icmp_pend    <= 1'b0;
              icmp_hold    <= 1'b0;
              icmp_replies <= icmp_replies + 16'd1;
            end
          end
        end
      endcase
    end
  end

  // ---------------- reply bytes ----------------
  function automatic logic [7:0] arp_byte(input logic [15:0] i, input logic [47:0] mac,
                                          input logic [31:0] ip);
    logic [7:0] b;
    b = 8'h00;
    if (i < 16'd6)                     b = mac[8*(5-i[2:0]) +: 8];
    else if (i < 16'd12)               b = MY_MAC[8*(11-i[3:0]) +: 8];
    else case (i)
      16'd12: b = 8'h08;  16'd13: b = 8'h06;
      16'd14: b = 8'h00;  16'd15: b = 8'h01;
      16'd16: b = 8'h08;  16'd17: b = 8'h00;
      16'd18: b = 8'h06;  16'd19: b = 8'h04;
      16'd20: b = 8'h00;  16'd21: b = 8'h02;
      default: begin
        if (i >= 16'd22 && i < 16'd28)      b = MY_MAC[8*(27-i[4:0]) +: 8];
        else if (i >= 16'd28 && i < 16'd32) b = MY_IP[8*(31-i[4:0]) +: 8];
        else if (i >= 16'd32 && i < 16'd38) b = mac[8*(37-i[5:0]) +: 8];
        else if (i >= 16'd38 && i < 16'd42) b = ip[8*(41-i[5:0]) +: 8];
      end
    endcase
    return b;
  endfunction

  function automatic logic [7:0] icmp_byte(input logic [15:0] i, input logic [7:0] stored);
    logic [7:0] b;
    b = stored;
    if (i < 16'd6)                      b = peer_mac[8*(5-i[2:0]) +: 8];
    else if (i < 16'd12)                b = MY_MAC[8*(11-i[3:0]) +: 8];
    else if (i >= 16'd26 && i < 16'd30) b = MY_IP[8*(29-i[4:0]) +: 8];
    else if (i >= 16'd30 && i < 16'd34) b = peer_ip[8*(33-i[5:0]) +: 8];
    else if (i == 16'd34)               b = 8'h00;
    else if (i == 16'd36)               b = icmp_csum[15:8];
    else if (i == 16'd37)               b = icmp_csum[7:0];
    return b;
  endfunction

  assign tx_valid = (tx_st != TX_IDLE);
  assign tx_last  = tx_valid && (tx_idx == tx_len - 16'd1);
  assign tx_data  = (tx_st == TX_ARP)  ? arp_byte(tx_idx, arp_mac, arp_ip) :
                    (tx_st == TX_ICMP) ? icmp_byte(tx_idx, buf_mem[tx_idx[AW-1:0]]) : 8'h00;

endmodule
