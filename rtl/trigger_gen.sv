// trigger_gen: trigger generation of the SRU.
//
// Three trigger sources, as in the design description: a periodic counter,
// an external trigger input and a write to a CSR (udp_trig).  trig_mode[0]
// enables the periodic source, trig_mode[1] the external one; the CSR
// trigger always works.  Each accepted trigger runs the sequence
//   L1:   one '1' bit on the FeeTrig stream (the CPLD sees shift pattern 0010)
//   wait  l2_delay DTC clocks (at least MIN_L2_DELAY)
//   L2:   two '1' bits (the CPLD sees 0011, then 0110)
//   RDO:  a channel readout command pulse to the DTC transmitters
// If the readout path is still busy with the previous event when L2 is due
// (busy input), the event cannot be stored: the generator sends the abort
// command instead of L2 and RDO.  A short gap of zeros follows every
// sequence.  Triggers arriving during a sequence are ignored and counted in
// missed.  The bit patterns come from the CPLD trigger decoder of the design;
// the L2 delay, the abort rule and the gap length are this implementation's
// choices.  The external input is synchronised and its rising edge used.
module trigger_gen #(
  parameter int unsigned MIN_L2_DELAY = 16,
  parameter int unsigned GAP          = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  trig_mode,
  input  logic [31:0] trig_period,
  input  logic [15:0] l2_delay,
  input  logic        udp_trig,
  input  logic        ext_trig,
  input  logic        busy,
  output logic        fee_trig,
  output logic        rdo_cmd,
  output logic        abort_cmd,
  output logic [15:0] trig_count,
  output logic [15:0] abort_count,
  output logic [15:0] missed
);

  typedef enum logic [2:0] {IDLE, WAIT_L2, L2A, L2B, GAPST} st_t;
  st_t st;

  logic [31:0] pcnt;
  logic [2:0]  ext_sync;
  logic        periodic_hit, ext_hit, req;
  logic [15:0] cnt, l2_eff;

  assign l2_eff       = (l2_delay < 16'(MIN_L2_DELAY)) ? 16'(MIN_L2_DELAY) : l2_delay;
  assign periodic_hit = trig_mode[0] && (pcnt >= trig_period - 32'd1);
  assign ext_hit      = trig_mode[1] && ext_sync[1] && !ext_sync[2];
  assign req          = periodic_hit || ext_hit || udp_trig;

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= IDLE;
      pcnt        <= '0;
      ext_sync    <= '0;
      cnt         <= '0;
      fee_trig    <= 1'b0;
      rdo_cmd     <= 1'b0;
      abort_cmd   <= 1'b0;
      trig_count  <= '0;
      abort_count <= '0;
      missed      <= '0;
    end else begin
      ext_sync  <= {ext_sync[1:0], ext_trig};
      pcnt      <= (periodic_hit || !trig_mode[0]) ? 32'd0 : pcnt + 32'd1;
      fee_trig  <= 1'b0;
      rdo_cmd   <= 1'b0;
      abort_cmd <= 1'b0;
      case (st)
        IDLE: if (req) begin
          fee_trig   <= 1'b1;
          trig_count <= trig_count + 16'd1;
          cnt        <= '0;
          st         <= WAIT_L2;
        end
        WAIT_L2: begin
          cnt <= cnt + 16'd1;
          if (cnt == l2_eff - 16'd1) begin
            cnt <= '0;
            if (busy) begin
              abort_cmd   <= 1'b1;
              abort_count <= abort_count + 16'd1;
              st          <= GAPST;
            end else begin
              fee_trig <= 1'b1;
              st       <= L2A;
            end
          end
        end
        L2A: begin
          fee_trig <= 1'b1;
          st       <= L2B;
        end
        L2B: begin
          rdo_cmd <= 1'b1;
          st      <= GAPST;
        end
        GAPST: begin
          cnt <= cnt + 16'd1;
          if (cnt == 16'(GAP - 1)) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
      if (req && st != IDLE) missed <= missed + 16'd1;
    end
  end

endmodule
