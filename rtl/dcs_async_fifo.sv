// dcs_async_fifo: 8-bit in, 32-bit out dual-clock FIFO of a DCS command decoder.
//
// The write side runs on the 125 MHz Ethernet clock and takes command bytes;
// four bytes are packed big-endian (first byte in [31:24]) into one 32-bit
// word before it is written.  The read side runs on the 40 MHz DTC clock.
// Pointers cross the clock domains in Gray code through two-flop
// synchronisers, the usual construction for an asynchronous FIFO.
// Interface: wr_en/wr_data per byte; rd_en pops one word and rd_data holds it
// from the next read clock on (one cycle read latency, as the design's FSM
// expects).  rd_empty is in the read domain, wr_full in the write domain;
// bytes offered while full are dropped and counted by wr_overflow.
// The depth of 1024 words holds one packet of 500 commands (1000 words), the
// limit the design gives for a command packet.
module dcs_async_fifo #(
  parameter int unsigned AW = 10          // log2 of depth in 32-bit words
) (
  input  logic        wclk,
  input  logic        wrst,
  input  logic        wr_en,
  input  logic [7:0]  wr_data,
  output logic        wr_full,
  output logic        wr_overflow,
  input  logic        rclk,
  input  logic        rrst,
  input  logic        rd_en,
  output logic [31:0] rd_data,
  output logic        rd_empty
);

  logic [31:0] mem [2**AW];

  // ---------------- write domain ----------------
  logic [AW:0] wptr_bin, wptr_gray, rptr_gray_w1, rptr_gray_w2;
  logic [AW:0] rptr_bin, rptr_gray, wptr_gray_r1, wptr_gray_r2;
  logic [23:0] pack;
  logic [1:0]  bsel;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wr_full = (wptr_gray == {~rptr_gray_w2[AW:AW-1], rptr_gray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wptr_bin     <= '0;
      wptr_gray    <= '0;
      rptr_gray_w1 <= '0;
      rptr_gray_w2 <= '0;
      pack         <= '0;
      bsel         <= '0;
      wr_overflow  <= 1'b0;
    end else begin
      rptr_gray_w1 <= rptr_gray;
      rptr_gray_w2 <= rptr_gray_w1;
      if (wr_en) begin
        bsel <= bsel + 2'd1;
        if (bsel != 2'd3) begin
          pack <= {pack[15:0], wr_data};
        end else if (!wr_full) begin
          mem[wptr_bin[AW-1:0]] <= {pack, wr_data};
          wptr_bin  <= wptr_bin + 1'b1;
          wptr_gray <= bin2gray(wptr_bin + 1'b1);
        end else begin
          wr_overflow <= 1'b1;
        end
      end
    end
  end

  // ---------------- read domain ----------------

  assign rd_empty = (rptr_gray == wptr_gray_r2);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rptr_bin     <= '0;
      rptr_gray    <= '0;
      wptr_gray_r1 <= '0;
      wptr_gray_r2 <= '0;
      rd_data      <= '0;
    end else begin
      wptr_gray_r1 <= wptr_gray;
      wptr_gray_r2 <= wptr_gray_r1;
      if (rd_en && !rd_empty) begin
        rd_data   <= mem[rptr_bin[AW-1:0]];
        rptr_bin  <= rptr_bin + 1'b1;
        rptr_gray <= bin2gray(rptr_bin + 1'b1);
      end
    end
  end

endmodule
