// dcs_cmd_decoder: DCS command decoder of one DTC link (one of 40) in the SRU.
//
// Buffers the command bytes that the UDP command distribution addresses to
// this link and hands them, one address/data pair at a time, to the link's
// DTC transmitter.  A dual-clock FIFO (dcs_async_fifo) crosses from the
// 125 MHz Ethernet clock to the 40 MHz DTC clock and packs bytes into 32-bit
// words.  A Moore FSM on the DTC clock then works as the design describes:
//   ST0        wait for the FIFO to become non-empty
//   ST1        wait until the whole UDP payload is in the FIFO
//   ST2, ST3   pop the address word, then the data word
//   ST4, ST5   latch them (one cycle FIFO read latency); ST5 raises udp_cmd_dv
//              and holds it until the transmitter answers with udp_cmd_ack
//   ST6        choose a watchdog state: more commands or last command
//   WD_MORE/WD_LAST wait WATCHDOG DTC clocks (160, from the design; a
//              read/write command occupies 88 clocks on the link in this
//              implementation) and return to ST2 or ST0.
// "Payload fully loaded" is this implementation's choice of detection: the
// write side keeps a 'loading' level high while bytes arrive and for four
// Ethernet clocks after; ST1 leaves once the synchronised level has been low
// for four DTC clocks.
// The FIFO's full flag is not used (lint reports it): bytes arriving while
// the FIFO is full are dropped and reported by the sticky fifo_overflow.
module dcs_cmd_decoder #(
  parameter int unsigned AW       = 10,
  parameter int unsigned WATCHDOG = 160
) (
  input  logic        eth_clk,
  input  logic        eth_rst,
  input  logic [7:0]  dcs_rxd,
  input  logic        dcs_rx_dv,
  input  logic        dtc_clk,
  input  logic        dtc_rst,
  output logic [31:0] udp_cmd_addr,
  output logic [31:0] udp_cmd_data,
  output logic        udp_cmd_dv,
  input  logic        udp_cmd_ack,
  output logic        fifo_overflow
);

  logic        fifo_rd_en, fifo_empty, fifo_full;
  logic [31:0] rd_data;

  dcs_async_fifo #(.AW(AW)) u_fifo (
    .wclk(eth_clk), .wrst(eth_rst), .wr_en(dcs_rx_dv), .wr_data(dcs_rxd),
    .wr_full(fifo_full), .wr_overflow(fifo_overflow),
    .rclk(dtc_clk), .rrst(dtc_rst), .rd_en(fifo_rd_en), .rd_data(rd_data),
    .rd_empty(fifo_empty)
  );

  // ---------------- write side: payload loading level ----------------
  logic       loading;
  logic [2:0] hold;
  always_ff @(posedge eth_clk) begin
    if (eth_rst) begin
      loading <= 1'b0;
      hold    <= '0;
    end else if (dcs_rx_dv) begin
      loading <= 1'b1;
      hold    <= 3'd4;
    end else if (hold != 0) begin
      hold <= hold - 3'd1;
    end else begin
      loading <= 1'b0;
    end
  end

  logic [2:0] loading_sync;
  always_ff @(posedge dtc_clk) begin
    if (dtc_rst) loading_sync <= '0;
    else         loading_sync <= {loading_sync[1:0], loading};
  end

  // ---------------- read side FSM ----------------
  typedef enum logic [3:0] {ST0, ST1, ST2, ST3, ST4, ST5, ST6, WD_MORE, WD_LAST} st_t;
  st_t        st;
  logic [7:0] cnt;

  assign fifo_rd_en = (st == ST2) || (st == ST3);
  assign udp_cmd_dv = (st == ST5);

  always_ff @(posedge dtc_clk) begin
    if (dtc_rst) begin
      st           <= ST0;
      cnt          <= '0;
      udp_cmd_addr <= '0;
      udp_cmd_data <= '0;
    end else begin
      case (st)
        ST0: begin
          cnt <= '0;
          if (!fifo_empty) st <= ST1;
        end
        ST1: begin
          if (loading_sync[2]) cnt <= '0;
          else if (cnt == 8'd3) begin
            cnt <= '0;
            st  <= ST2;
          end else cnt <= cnt + 8'd1;
        end
        ST2: st <= ST3;
        ST3: begin
          udp_cmd_addr <= rd_data;   // address word popped in ST2
          st <= ST4;
        end
        ST4: begin
          udp_cmd_data <= rd_data;   // data word popped in ST3
          st <= ST5;
        end
        ST5: if (udp_cmd_ack) st <= ST6;
        ST6: begin
          cnt <= '0;
          st  <= fifo_empty ? WD_LAST : WD_MORE;
        end
        WD_MORE, WD_LAST: begin
          if (cnt == 8'(WATCHDOG - 1)) begin
            cnt <= '0;
            st  <= (st == WD_MORE) ? ST2 : ST0;
          end else cnt <= cnt + 8'd1;
        end
        default: st <= ST0;
      endcase
    end
  end

  // A command is only offered with both words latched.
  assert property (@(posedge dtc_clk) disable iff (dtc_rst) udp_cmd_ack |-> udp_cmd_dv);

endmodule
