// cpld_csr: control and status registers of the front-end CPLD.
//
// Reached through the command demux with an 8-bit address and 16-bit data.
// Every command is answered with a one-cycle cpld_cmd_ack in the cycle after
// cpld_cmd_exec rises; read data is valid together with the ack.
// Registers (addresses in readout_pkg, CPLD_CSR_*; map and reset values are
// this implementation's choice, the design names only the functions):
//   CH_MASK  16 bits, 1 = channel skipped in a readout
//   ADC_DIV  bit 0 selects the ADC clock ratio: 0 = RDOClk/2, 1 = RDOClk/4
//   STATUS   read-only: [0] SALTRO error, [1] readout busy
//   SCRATCH  16-bit read/write register
//   COUNTERS eight read-only 16-bit status counters (see cpld_top)
module cpld_csr
  import readout_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        cpld_cmd_exec,
  input  logic        cpld_cmd_rnw,
  input  logic [7:0]  cpld_cmd_addr,
  input  logic [15:0] cpld_cmd_wdata,
  output logic [15:0] cpld_cmd_rdata,
  output logic        cpld_cmd_ack,
  output logic [15:0] ch_mask,
  output logic        adc_div4,
  input  logic        saltro_error,
  input  logic        rdo_busy,
  input  logic [7:0][15:0] counters   // read-only, at CPLD_CSR_COUNTERS + i
);

  logic [15:0] scratch;
  logic        done;     // command already answered, wait for exec to fall

  always_ff @(posedge clk) begin
    if (rst) begin
      ch_mask        <= '0;
      adc_div4       <= 1'b0;
      scratch        <= '0;
      cpld_cmd_rdata <= '0;
      cpld_cmd_ack   <= 1'b0;
      done           <= 1'b0;
    end else begin
      cpld_cmd_ack <= 1'b0;
      if (!cpld_cmd_exec) done <= 1'b0;
      if (cpld_cmd_exec && !done && !cpld_cmd_ack) begin
        cpld_cmd_ack <= 1'b1;
        done         <= 1'b1;
        if (!cpld_cmd_rnw) begin
          case (cpld_cmd_addr)
            CPLD_CSR_CH_MASK: ch_mask  <= cpld_cmd_wdata;
            CPLD_CSR_ADC_DIV: adc_div4 <= cpld_cmd_wdata[0];
            CPLD_CSR_SCRATCH: scratch  <= cpld_cmd_wdata;
            default: ;
          endcase
        end
        case (cpld_cmd_addr)
          CPLD_CSR_CH_MASK: cpld_cmd_rdata <= ch_mask;
          CPLD_CSR_ADC_DIV: cpld_cmd_rdata <= {15'd0, adc_div4};
          CPLD_CSR_STATUS:  cpld_cmd_rdata <= {14'd0, rdo_busy, saltro_error};
          CPLD_CSR_SCRATCH: cpld_cmd_rdata <= scratch;
          default:
            if (cpld_cmd_addr[7:3] == CPLD_CSR_COUNTERS[7:3])
              cpld_cmd_rdata <= counters[cpld_cmd_addr[2:0]];
            else
              cpld_cmd_rdata <= '0;
        endcase
      end
    end
  end

endmodule
