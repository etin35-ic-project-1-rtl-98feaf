// tb_cpld_dtc_rx_decoder: serialises fast commands and read/write commands
// (header 0xE1, address word, data word, MSB first) with idle zeros between
// them and checks the command flags and the fields presented with
// dtc_cmd_exec, which must stay high until the testbench acknowledges.
module tb_cpld_dtc_rx_decoder;
  import readout_pkg::*;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        cmd_bit = 0, rdo_cmd, abort_cmd, reset_cmd, dtc_cmd_exec, dtc_cmd_rnw, dtc_cmd_feenal;
  logic        dtc_cmd_ack = 0;
  logic [19:0] dtc_cmd_addr, dtc_cmd_data;
  cpld_dtc_rx_decoder dut (.clk, .rst, .cmd_bit, .rdo_cmd, .abort_cmd, .reset_cmd, .dtc_cmd_exec,
    .dtc_cmd_rnw, .dtc_cmd_feenal, .dtc_cmd_addr, .dtc_cmd_data, .dtc_cmd_ack);
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int n_rdo = 0, n_abort = 0, n_reset = 0, n_exec = 0;
  logic [41:0] exp_q [$];
  always @(posedge clk) if (!rst) begin
    if (rdo_cmd) n_rdo++;
    if (abort_cmd) n_abort++;
    if (reset_cmd) n_reset++;
  end
  // acknowledging target: checks the fields, acks after a random delay
  initial begin
    forever begin
      @(negedge clk);
      if (dtc_cmd_exec) begin
        check(exp_q.size() > 0, "exec expected");
        if (exp_q.size() > 0) begin
          check({dtc_cmd_rnw, dtc_cmd_feenal, dtc_cmd_addr, dtc_cmd_data} == exp_q[0],
                $sformatf("fields %b %b %h %h", dtc_cmd_rnw, dtc_cmd_feenal, dtc_cmd_addr, dtc_cmd_data));
          void'(exp_q.pop_front());
        end
        repeat ($urandom_range(0, 20)) begin
          @(negedge clk);
          check(dtc_cmd_exec, "exec held until ack");
        end
        dtc_cmd_ack = 1;
        @(negedge clk); dtc_cmd_ack = 0;
        n_exec++;
        @(negedge clk);
      end
    end
  end
  task automatic send_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin @(negedge clk); cmd_bit = b[i]; end
  endtask
  task automatic gap();
    repeat (8) begin @(negedge clk); cmd_bit = 0; end
  endtask
  task automatic send_rw(input logic rnw, input logic feenal, input logic [19:0] a, input logic [19:0] d);
    logic [31:0] aw, dw;
    aw = {rnw, feenal, 10'h3FF, a};
    dw = {12'hABC, d};
    exp_q.push_back({rnw, feenal, a, d});
    send_byte(CODE_RW);
    for (int i = 3; i >= 0; i--) send_byte(aw[8*i +: 8]);
    for (int i = 3; i >= 0; i--) send_byte(dw[8*i +: 8]);
    gap();
  endtask
  initial begin
    int e_rdo = 0, e_abort = 0, e_reset = 0, e_rw = 0, k;
    repeat (3) @(negedge clk);
    rst = 0;
    gap();
    for (int i = 0; i < 40; i++) begin
      k = $urandom_range(0, 4);
      case (k)
        0: begin send_byte(CODE_RDO); gap(); e_rdo++; end
        1: begin send_byte(CODE_ABORT); gap(); e_abort++; end
        2: begin send_byte(CODE_RESET); gap(); e_reset++; end
        3: begin send_byte(8'hF0); gap(); end       // unknown code: ignored
        default: begin
          send_rw(1'($urandom()), 1'($urandom()), 20'($urandom()), 20'($urandom()));
          e_rw++;
          wait (n_exec == e_rw);
        end
      endcase
    end
    repeat (50) @(negedge clk);
    check(n_rdo == e_rdo && n_abort == e_abort && n_reset == e_reset,
          $sformatf("fast commands %0d %0d %0d exp %0d %0d %0d", n_rdo, n_abort, n_reset, e_rdo, e_abort, e_reset));
    check(n_exec == e_rw && exp_q.size() == 0, "all read/write commands executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
