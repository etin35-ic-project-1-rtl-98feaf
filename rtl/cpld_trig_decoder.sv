// cpld_trig_decoder: trigger decoder of the front-end CPLD (Fig. 24 of the
// design description).
//
// A 4-bit shift register samples the trigger half of the DDR DTC trig line
// (trig_bit; on the board the falling-edge sample) and an FSM turns the
// patterns into the active-low SALTRO trigger lines:
//   WAIT0   shift_reg == 4'b0010 (one '1' bit): L1 -> trig_l1_n low, Trig_L1
//           shift_reg == 4'b0011 (two '1' bits): possible L2 -> WAIT1
//   Trig_L1 keep trig_l1_n low while clk_cnt counts 0..9, then WAIT0
//   WAIT1   shift_reg == 4'b0110: valid L2 -> Trig_L2, otherwise WAIT2
//   Trig_L2 trig_l2_n low for two clocks (clk_cnt 0..1), then WAIT0
//   WAIT2   timeout of six clocks (clk_cnt 0..5) ignoring a false trigger
// So trig_l1_n goes low one clock after the L1 pattern is complete and stays
// low for 10 clocks; trig_l2_n goes low two clocks after the L2 pattern
// and stays low for two clocks.  Patterns and counts follow the figure.
module cpld_trig_decoder (
  input  logic clk,          // RDOClk = DTC clock
  input  logic rst,
  input  logic trig_bit,
  output logic trig_l1_n,
  output logic trig_l2_n,
  output logic [15:0] l1_count,
  output logic [15:0] l2_count,
  output logic [15:0] false_count
);

  typedef enum logic [2:0] {WAIT0, TRIG_L1, WAIT1, TRIG_L2, WAIT2} st_t;
  st_t        st;
  logic [3:0] shift_reg;
  logic [3:0] clk_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= WAIT0;
      shift_reg   <= '0;
      clk_cnt     <= '0;
      trig_l1_n   <= 1'b1;
      trig_l2_n   <= 1'b1;
      l1_count    <= '0;
      l2_count    <= '0;
      false_count <= '0;
    end else begin
      shift_reg <= {shift_reg[2:0], trig_bit};
      case (st)
        WAIT0: begin
          clk_cnt   <= '0;
          trig_l2_n <= 1'b1;
          trig_l1_n <= (shift_reg == 4'b0010) ? 1'b0 : 1'b1;
          if (shift_reg == 4'b0010) begin
            st       <= TRIG_L1;
            l1_count <= l1_count + 16'd1;
          end else if (shift_reg == 4'b0011) begin
            st <= WAIT1;
          end
        end
        TRIG_L1: begin
          clk_cnt   <= clk_cnt + 4'd1;
          trig_l1_n <= 1'b0;
          if (clk_cnt == 4'd9) begin
            st        <= WAIT0;
            trig_l1_n <= 1'b1;
          end
        end
        WAIT1: begin
          clk_cnt   <= '0;
          trig_l1_n <= 1'b1;
          trig_l2_n <= 1'b1;
          if (shift_reg == 4'b0110) begin
            st       <= TRIG_L2;
            l2_count <= l2_count + 16'd1;
          end else begin
            st          <= WAIT2;
            false_count <= false_count + 16'd1;
          end
        end
        TRIG_L2: begin
          clk_cnt   <= clk_cnt + 4'd1;
          trig_l2_n <= 1'b0;
          if (clk_cnt == 4'd1) st <= WAIT0;
        end
        WAIT2: begin
          clk_cnt   <= clk_cnt + 4'd1;
          trig_l1_n <= 1'b1;
          trig_l2_n <= 1'b1;
          if (clk_cnt == 4'd5) st <= WAIT0;
        end
        default: st <= WAIT0;
      endcase
    end
  end

endmodule
