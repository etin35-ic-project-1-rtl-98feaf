// cmd_ack_fsm: pulse-to-handshake converter in front of the SRU DTC packing FSM.
//
// A command source (readout, abort or fast command) gives a one-cycle pulse.
// This block remembers it as a held request ("command buffer") until the
// packing FSM, which may be busy sending another command, answers with a
// one-cycle ack when it starts the command.  A pulse that arrives while a
// request is already pending is merged into it.  One flip-flop; the request
// is visible the cycle after the pulse.
module cmd_ack_fsm (
  input  logic clk,
  input  logic rst,
  input  logic cmd_pulse,
  input  logic ack,
  output logic req
);

  typedef enum logic {IDLE, PENDING} st_t;
  st_t st;

  assign req = (st == PENDING);

  always_ff @(posedge clk) begin
    if (rst) st <= IDLE;
    else case (st)
      IDLE:    if (cmd_pulse) st <= PENDING;
      PENDING: if (ack && !cmd_pulse) st <= IDLE;
      default: st <= IDLE;
    endcase
  end

endmodule
