// sru_dtc_tx: DTC transmitter of one link in the SRU (Fig. 13 and Fig. 15 of
// the design description).
//
// Sends three kinds of DTC commands to the front-end CPLD: the channel
// readout (RDO) and abort fast commands from the trigger generator, fast
// commands with a CSR-supplied code, and slow read/write commands from the
// link's DCS command decoder.  Each fast-command input passes through a
// cmd_ack_fsm so a pulse is not lost while the packing FSM is busy.
//
// Packing FSM (one state per byte slot of 8 DTC clocks):
//   st0  idle, dtc_pdin = 0; picks RDO > abort > fast > read/write
//   st1  RDO code           st2  abort code          st13 fast code
//   st4  read/write header 0xE1, st5-st8 address bytes, st9-st12 data bytes
//   st14 one idle byte, then back to st0
// The ack of a request is a one-cycle pulse when its state is entered.
// The serializer shifts dtc_pdin out MSB first, one bit per DTC clock, on
// the command half of the DDR trig line (dtc_trig[0]); FeeTrig from the
// trigger generator goes on the trigger half (dtc_trig[1]).  The DDR output
// buffer itself is a device primitive and is represented by this pair.
// The byte-slot length, the state priority and the fast-command code values
// (readout_pkg) are choices of this implementation.
module sru_dtc_tx
  import readout_pkg::*;
(
  input  logic        clk,            // 40 MHz DTC clock
  input  logic        rst,
  input  logic [31:0] udp_cmd_addr,
  input  logic [31:0] udp_cmd_data,
  input  logic        udp_cmd_dv,
  output logic        udp_cmd_ack,
  input  logic        rdo_cmd,        // pulses
  input  logic        abort_cmd,
  input  logic        fast_cmd,
  input  logic [7:0]  fast_cmd_code,
  input  logic        fee_trig,       // trigger bit stream
  output logic [1:0]  dtc_trig,       // [1] trigger half, [0] command half
  output logic        busy
);

  logic rdo_req, abort_req, fast_req;
  logic rdo_ack, abort_ack, fast_ack;

  cmd_ack_fsm u_rdo   (.clk, .rst, .cmd_pulse(rdo_cmd),   .ack(rdo_ack),   .req(rdo_req));
  cmd_ack_fsm u_abort (.clk, .rst, .cmd_pulse(abort_cmd), .ack(abort_ack), .req(abort_req));
  cmd_ack_fsm u_fast  (.clk, .rst, .cmd_pulse(fast_cmd),  .ack(fast_ack),  .req(fast_req));

  typedef enum logic [3:0] {
    ST0 = 4'd0, ST1 = 4'd1, ST2 = 4'd2, ST4 = 4'd4, ST5 = 4'd5, ST6 = 4'd6,
    ST7 = 4'd7, ST8 = 4'd8, ST9 = 4'd9, ST10 = 4'd10, ST11 = 4'd11,
    ST12 = 4'd12, ST13 = 4'd13, ST14 = 4'd14
  } st_t;

  st_t         st, st_nx;
  logic [2:0]  bitcnt;
  logic [7:0]  shreg, pdin_nx, fast_code_q;
  logic [63:0] cmd_q;
  logic        slot_end;

  assign slot_end = (bitcnt == 3'd7);
  assign busy     = (st != ST0);

  // next state, taken at the end of a byte slot
  always_comb begin
    st_nx = st;
    case (st)
      ST0: begin
        if      (rdo_req)    st_nx = ST1;
        else if (abort_req)  st_nx = ST2;
        else if (fast_req)   st_nx = ST13;
        else if (udp_cmd_dv) st_nx = ST4;
      end
      ST1, ST2, ST13, ST12: st_nx = ST14;
      ST14:    st_nx = ST0;
      default: st_nx = st_t'(st + 4'd1);   // ST4 .. ST11 step through the bytes
    endcase
  end

  // byte presented in the next state
  always_comb begin
    case (st_nx)
      ST1:     pdin_nx = CODE_RDO;
      ST2:     pdin_nx = CODE_ABORT;
      ST13:    pdin_nx = fast_code_q;
      ST4:     pdin_nx = CODE_RW;
      ST5:     pdin_nx = cmd_q[63:56];
      ST6:     pdin_nx = cmd_q[55:48];
      ST7:     pdin_nx = cmd_q[47:40];
      ST8:     pdin_nx = cmd_q[39:32];
      ST9:     pdin_nx = cmd_q[31:24];
      ST10:    pdin_nx = cmd_q[23:16];
      ST11:    pdin_nx = cmd_q[15:8];
      ST12:    pdin_nx = cmd_q[7:0];
      default: pdin_nx = 8'h00;
    endcase
  end

  logic take;
  assign take = slot_end && (st == ST0);
  assign rdo_ack     = take && (st_nx == ST1);
  assign abort_ack   = take && (st_nx == ST2);
  assign fast_ack    = take && (st_nx == ST13);
  assign udp_cmd_ack = take && (st_nx == ST4);

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= ST0;
      bitcnt      <= '0;
      shreg       <= '0;
      cmd_q       <= '0;
      fast_code_q <= '0;
      dtc_trig    <= '0;
    end else begin
      bitcnt <= bitcnt + 3'd1;
      if (fast_cmd) fast_code_q <= fast_cmd_code;
      if (udp_cmd_ack) cmd_q <= {udp_cmd_addr, udp_cmd_data};
      if (slot_end) begin
        st    <= st_nx;
        shreg <= pdin_nx;
      end else begin
        shreg <= {shreg[6:0], 1'b0};
      end
      dtc_trig <= {fee_trig, shreg[7]};
    end
  end

endmodule
