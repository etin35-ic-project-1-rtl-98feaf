// tb_cmd_ack_fsm: a pulse becomes a held request, cleared by ack; a pulse in
// the ack cycle keeps the request; no request without a pulse.
module tb_cmd_ack_fsm;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic cmd_pulse = 0, ack = 0, req;
  cmd_ack_fsm dut (.clk, .rst, .cmd_pulse, .ack, .req);
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); check(!req, "idle after reset");
    cmd_pulse = 1; @(negedge clk); cmd_pulse = 0;
    check(req, "request after pulse");
    repeat (5) @(negedge clk); check(req, "request held while busy");
    ack = 1; @(negedge clk); ack = 0;
    check(!req, "request cleared by ack");
    cmd_pulse = 1; @(negedge clk); cmd_pulse = 0;
    ack = 1; cmd_pulse = 1; @(negedge clk); ack = 0; cmd_pulse = 0;
    check(req, "new pulse during ack keeps request");
    ack = 1; @(negedge clk); ack = 0;
    check(!req, "cleared again");
    repeat (3) @(negedge clk); check(!req, "stays idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
