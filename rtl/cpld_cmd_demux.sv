// cpld_cmd_demux: address/data demultiplexer, reply packer and reply_rdy FSM
// of the front-end CPLD (Fig. 27-30 of the design description).
//
// A read/write command from the DTC RX decoder goes, by its CType bit
// (dtc_cmd_feenal), either to the CPLD CSRs (CType 0: 8-bit address, 16-bit
// data) or to the SALTRO interface controller (CType 1: 20-bit address and
// data).  The target's one-cycle ack is returned as dtc_cmd_ack.
// When a read is acknowledged the reply packer latches
//   reply_addr = {rnw, CType, 10'b0, address}    (the command address word)
//   reply_data = read data, zero-extended to 32 bits
// and the reply_rdy FSM (Fig. 29) runs:
//   st0  reply_rdy = 0; on dtc_cmd_ack & dtc_cmd_rnw -> st1
//   st1  reply_rdy = 1 until the DTC TX FSM raises frame_state -> st2
//   st2  reply_rdy = 0 until frame_state falls -> st0
// so no second reply request is made while a reply frame is being sent.
module cpld_cmd_demux (
  input  logic        clk,
  input  logic        rst,
  // from DTC RX decoder
  input  logic        dtc_cmd_exec,
  input  logic        dtc_cmd_rnw,
  input  logic        dtc_cmd_feenal,
  input  logic [19:0] dtc_cmd_addr,
  input  logic [19:0] dtc_cmd_data,
  output logic        dtc_cmd_ack,
  // CPLD CSR interface
  output logic        cpld_cmd_exec,
  output logic        cpld_cmd_rnw,
  output logic [7:0]  cpld_cmd_addr,
  output logic [15:0] cpld_cmd_wdata,
  input  logic [15:0] cpld_cmd_rdata,
  input  logic        cpld_cmd_ack,
  // SALTRO controller command interface
  output logic        saltro_cmd_exec,
  output logic        saltro_cmd_rw,
  output logic [19:0] saltro_cmd_addr,
  output logic [19:0] saltro_cmd_rx,
  input  logic [19:0] saltro_cmd_tx,
  input  logic        saltro_cmd_ack,
  // reply to the DTC TX FSM
  output logic [31:0] reply_addr,
  output logic [31:0] reply_data,
  output logic        reply_rdy,
  input  logic        frame_state
);

  assign cpld_cmd_exec   = dtc_cmd_exec && !dtc_cmd_feenal;
  assign cpld_cmd_rnw    = dtc_cmd_rnw;
  assign cpld_cmd_addr   = dtc_cmd_addr[7:0];
  assign cpld_cmd_wdata  = dtc_cmd_data[15:0];
  assign saltro_cmd_exec = dtc_cmd_exec && dtc_cmd_feenal;
  assign saltro_cmd_rw   = dtc_cmd_rnw;
  assign saltro_cmd_addr = dtc_cmd_addr;
  assign saltro_cmd_rx   = dtc_cmd_data;
  assign dtc_cmd_ack     = dtc_cmd_feenal ? saltro_cmd_ack : cpld_cmd_ack;

  typedef enum logic [1:0] {ST0, ST1, ST2} st_t;
  st_t st;

  assign reply_rdy = (st == ST1);

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= ST0;
      reply_addr <= '0;
      reply_data <= '0;
    end else begin
      case (st)
        ST0: if (dtc_cmd_exec && dtc_cmd_ack && dtc_cmd_rnw) begin
          reply_addr <= {dtc_cmd_rnw, dtc_cmd_feenal, 10'd0, dtc_cmd_addr};
          reply_data <= dtc_cmd_feenal ? {12'd0, saltro_cmd_tx} : {16'd0, cpld_cmd_rdata};
          st         <= ST1;
        end
        ST1: if (frame_state)  st <= ST2;
        ST2: if (!frame_state) st <= ST0;
        default: st <= ST0;
      endcase
    end
  end

endmodule
