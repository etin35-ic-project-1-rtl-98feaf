// saltro_model: behavioural model of the digital side of the SALTRO ADC chip,
// for simulation only (not synthesizable intent, no analog part).
//
// Bus protocol as the CPLD controller uses it (all signals active low):
//  * command: the CPLD drives {address, data} on BD and pulls cstbn low.
//    Two clocks later the chip pulls ackn low (read data on BD[19:0]) and
//    releases it one clock after cstbn returns high.  Broadcast commands
//    (address bit 18) are executed but not acknowledged.
//  * registers: 32 x 20 bit, selected by address bits [4:0].
//  * CHRDO (instruction 0x1A, channel in address bits [8:5]): after the
//    acknowledge the chip pulls trsfn low, sends the channel's words one per
//    clock with dstbn low, last sample first, and releases trsfn.
//    The delay from the end of the command to trsfn is the xfer_delay input,
//    so a testbench can make the chip slower or faster than the DTC link.
//  * RPINC (0x19): counts read events (rpinc_count).
//  * L2 trigger (trig_l2_n low) counts events; channel data depend on the
//    event number, channel and word index through word_of().
// Channel ch of every event has nwords + (ch % 3) 40-bit words (nwords is
// an input so a testbench can change the event size between events).
module saltro_model (
  input  logic        clk,
  input  logic        rst,
  input  logic [39:0] bd_out,
  input  logic [1:0]  bd_oe,
  output logic [39:0] bd_in,
  input  logic        cstbn,
  input  logic        writen,
  output logic        ackn,
  output logic        trsfn,
  output logic        dstbn,
  output logic        errorn,
  input  logic        trig_l1_n,
  input  logic        trig_l2_n,
  input  int          xfer_delay,      // clocks from acknowledge to trsfn low
  input  int          nwords,          // base number of samples per channel
  output int          l1_seen,
  output int          l2_seen,
  output int          chrdo_count,
  output int          rpinc_count,
  output int          reg_writes
);

  logic [19:0] regs [32];
  int          cst_cnt, xfer_left, xfer_idx, xfer_ch, wait_cnt;
  logic        l1_d, l2_d, in_cmd, bcast_cmd;
  typedef enum {IDLE, CMD, ACKED, XWAIT, XFER} st_t;
  st_t st;

  function automatic logic [39:0] word_of(input int ev, input int ch, input int j);
    return {10'(ev), 10'(ch), 10'(j), 10'(ev * 7 + ch * 3 + j)};
  endfunction

  function automatic int nwords_of(input int ch);
    return nwords + (ch % 3);
  endfunction

  assign errorn = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; ackn <= 1'b1; trsfn <= 1'b1; dstbn <= 1'b1; bd_in <= '0;
      l1_seen <= 0; l2_seen <= 0; chrdo_count <= 0; rpinc_count <= 0; reg_writes <= 0;
      l1_d <= 1'b1; l2_d <= 1'b1; cst_cnt <= 0; xfer_left <= 0; xfer_idx <= 0;
      xfer_ch <= 0; wait_cnt <= 0; in_cmd <= 1'b0; bcast_cmd <= 1'b0;
      for (int i = 0; i < 32; i++) regs[i] <= 20'(i * 16'h111);
    end else begin
      l1_d <= trig_l1_n;
      l2_d <= trig_l2_n;
      if (l1_d && !trig_l1_n) l1_seen <= l1_seen + 1;
      if (l2_d && !trig_l2_n) l2_seen <= l2_seen + 1;
      dstbn <= 1'b1;
      case (st)
        IDLE: if (!cstbn) begin
          st      <= CMD;
          cst_cnt <= 0;
          bcast_cmd <= bd_out[20 + 18];
        end
        CMD: begin
          cst_cnt <= cst_cnt + 1;
          if (cst_cnt == 1) begin
            // execute
            if (bd_out[24:20] == 5'h1A && !bd_out[20 + 18]) begin
              chrdo_count <= chrdo_count + 1;
              xfer_ch     <= int'(bd_out[28:25]);
              xfer_left   <= nwords_of(int'(bd_out[28:25]));
            end else begin
              xfer_left <= 0;
              if (bd_out[24:20] == 5'h19) rpinc_count <= rpinc_count + 1;
              else if (!writen) begin
                regs[bd_out[24:20]] <= bd_out[19:0];
                reg_writes <= reg_writes + 1;
              end
              bd_in <= {20'd0, regs[bd_out[24:20]]};
            end
            if (!bcast_cmd) ackn <= 1'b0;
          end
          if (cstbn) begin
            ackn     <= 1'b1;
            wait_cnt <= 0;
            st       <= (xfer_left > 0) ? XWAIT : IDLE;
          end
        end
        XWAIT: begin
          wait_cnt <= wait_cnt + 1;
          if (wait_cnt >= xfer_delay) begin
            trsfn    <= 1'b0;
            xfer_idx <= xfer_left - 1;
            st       <= XFER;
          end
        end
        XFER: begin
          if (xfer_idx >= 0) begin
            bd_in    <= word_of(l2_seen, xfer_ch, xfer_idx);
            dstbn    <= 1'b0;
            xfer_idx <= xfer_idx - 1;
          end else begin
            trsfn <= 1'b1;
            st    <= IDLE;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
