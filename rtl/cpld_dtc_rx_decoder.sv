// cpld_dtc_rx_decoder: DTC RX decoder of the front-end CPLD.
//
// Samples the command half of the DDR DTC trig line (cmd_bit; on the board
// the rising-edge sample) into a shift register and decodes commands:
//   ST0     idle; the first '1' bit starts a header byte (all command codes
//           have their MSB set, the line idles at 0)
//   HDR     collect the 8-bit header; the fast commands channel readout,
//           abort and reset give a one-cycle flag each; 0xE1 (read/write)
//           goes on to STCMD1; any other code is ignored
//   STCMD1  collect the 64 bits of address word and data word (MSB first)
//   STCMD2  drive dtc_cmd_exec with rnw (address bit 31), feenal (CType,
//           address bit 30), the 20-bit address and the low 20 data bits
//   STCMD3  hold them until dtc_cmd_ack from the command demux
// The state sequence and outputs follow the design description; the
// start-bit framing of the header is this implementation's choice.
module cpld_dtc_rx_decoder
  import readout_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        cmd_bit,
  output logic        rdo_cmd,
  output logic        abort_cmd,
  output logic        reset_cmd,
  output logic        dtc_cmd_exec,
  output logic        dtc_cmd_rnw,
  output logic        dtc_cmd_feenal,
  output logic [19:0] dtc_cmd_addr,
  output logic [19:0] dtc_cmd_data,
  input  logic        dtc_cmd_ack
);

  typedef enum logic [2:0] {ST0, HDR, STCMD1, STCMD2, STCMD3} st_t;
  st_t         st;
  logic [63:0] shift_reg;
  logic [6:0]  cnt;
  logic [7:0]  hdr;

  assign hdr          = {shift_reg[6:0], cmd_bit};
  assign dtc_cmd_exec = (st == STCMD3);

  always_ff @(posedge clk) begin
    if (rst) begin
      st             <= ST0;
      shift_reg      <= '0;
      cnt            <= '0;
      rdo_cmd        <= 1'b0;
      abort_cmd      <= 1'b0;
      reset_cmd      <= 1'b0;
      dtc_cmd_rnw    <= 1'b0;
      dtc_cmd_feenal <= 1'b0;
      dtc_cmd_addr   <= '0;
      dtc_cmd_data   <= '0;
    end else begin
      rdo_cmd   <= 1'b0;
      abort_cmd <= 1'b0;
      reset_cmd <= 1'b0;
      shift_reg <= {shift_reg[62:0], cmd_bit};
      case (st)
        ST0: if (cmd_bit) begin
          cnt <= 7'd1;
          st  <= HDR;
        end
        HDR: begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd7) begin
            cnt <= '0;
            st  <= ST0;
            case (hdr)
              CODE_RDO:   rdo_cmd   <= 1'b1;
              CODE_ABORT: abort_cmd <= 1'b1;
              CODE_RESET: reset_cmd <= 1'b1;
              CODE_RW:    st        <= STCMD1;
              default: ;
            endcase
          end
        end
        STCMD1: begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd63) st <= STCMD2;
        end
        STCMD2: begin
          // shift_reg now holds {address word, data word}
          dtc_cmd_rnw    <= shift_reg[63];
          dtc_cmd_feenal <= shift_reg[62];
          dtc_cmd_addr   <= shift_reg[51:32];
          dtc_cmd_data   <= shift_reg[19:0];
          st             <= STCMD3;
        end
        STCMD3: if (dtc_cmd_ack) st <= ST0;
        default: st <= ST0;
      endcase
    end
  end

endmodule
