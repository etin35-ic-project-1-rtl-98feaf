// sru_csr: control and status registers of the SRU ("SRU Cmd Decoder").
//
// Commands whose NodeSel[40] bit is set reach this block as address/data
// pairs (the same command format as for the DTC links, Table 1 of the design
// description), already moved to the 40 MHz DTC clock by a dcs_cmd_decoder.
// Each command is accepted in the cycle it is offered (cmd_ack = cmd_dv).
// A write (address bit 31 = 0) updates a register or fires a one-cycle
// pulse; a read (bit 31 = 1) returns the register on reply_* one clock later.
// Only the low 16 address bits are decoded, as the design specifies for the
// SRU.  The register map (readout_pkg SRU_CSR_*) and the reset values are
// this implementation's choices; the document names the functions (trigger
// modes incl. a CSR-written trigger, fast commands, the clock source select
// and the DTC word-align command) but not their addresses.
module sru_csr
  import readout_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] cmd_addr,
  input  logic [31:0] cmd_data,
  input  logic        cmd_dv,
  output logic        cmd_ack,
  // register outputs
  output logic [1:0]  trig_mode,       // [0] periodic, [1] external
  output logic [31:0] trig_period,
  output logic [15:0] l2_delay,
  output logic        dcs_src_sel,     // clock mux select, 1 = external clock
  output logic        udp_trig,        // pulses
  output logic        fast_cmd,
  output logic [7:0]  fast_cmd_code,
  output logic        word_align,
  // status inputs
  input  logic [31:0] status,
  input  logic [31:0] trig_stats,
  input  logic [31:0] err_stats,
  input  logic [31:0] eth_stats,
  // read reply
  output logic        reply_valid,
  output logic [31:0] reply_addr,
  output logic [31:0] reply_data
);

  logic [15:0] a;
  logic        rnw;
  assign a       = cmd_addr[15:0];
  assign rnw     = cmd_addr[31];
  assign cmd_ack = cmd_dv;

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_mode     <= '0;
      trig_period   <= 32'd40000;     // 1 kHz at 40 MHz
      l2_delay      <= 16'd64;
      dcs_src_sel   <= 1'b0;
      udp_trig      <= 1'b0;
      fast_cmd      <= 1'b0;
      fast_cmd_code <= CODE_RESET;
      word_align    <= 1'b0;
      reply_valid   <= 1'b0;
      reply_addr    <= '0;
      reply_data    <= '0;
    end else begin
      udp_trig    <= 1'b0;
      fast_cmd    <= 1'b0;
      word_align  <= 1'b0;
      reply_valid <= 1'b0;
      if (cmd_dv && !rnw) begin
        case (a)
          SRU_CSR_TRIG_MODE:   trig_mode   <= cmd_data[1:0];
          SRU_CSR_TRIG_PERIOD: trig_period <= cmd_data;
          SRU_CSR_L2_DELAY:    l2_delay    <= cmd_data[15:0];
          SRU_CSR_CLK_SEL:     dcs_src_sel <= cmd_data[0];
          SRU_CSR_UDP_TRIG:    udp_trig    <= 1'b1;
          SRU_CSR_FAST_CMD: begin
            fast_cmd      <= 1'b1;
            fast_cmd_code <= cmd_data[7:0];
          end
          SRU_CSR_WORD_ALIGN:  word_align  <= 1'b1;
          default: ;
        endcase
      end
      if (cmd_dv && rnw) begin
        reply_valid <= 1'b1;
        reply_addr  <= cmd_addr;
        case (a)
          SRU_CSR_TRIG_MODE:   reply_data <= {30'd0, trig_mode};
          SRU_CSR_TRIG_PERIOD: reply_data <= trig_period;
          SRU_CSR_L2_DELAY:    reply_data <= {16'd0, l2_delay};
          SRU_CSR_CLK_SEL:     reply_data <= {31'd0, dcs_src_sel};
          SRU_CSR_FAST_CMD:    reply_data <= {24'd0, fast_cmd_code};
          SRU_CSR_STATUS:      reply_data <= status;
          SRU_CSR_TRIG_STATS:  reply_data <= trig_stats;
          SRU_CSR_ERR_STATS:   reply_data <= err_stats;
          SRU_CSR_ETH_STATS:   reply_data <= eth_stats;
          default:             reply_data <= '0;
        endcase
      end
    end
  end

endmodule
