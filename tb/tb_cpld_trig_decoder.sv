// tb_cpld_trig_decoder: feeds L1 (single 1), L2 (two 1s) and false (three
// 1s) patterns on the trigger bit, separated by zeros, in random order, and
// checks the low times of trig_l1_n (10 clocks) and trig_l2_n (2 clocks)
// and the L1, L2 and false-trigger counts.
module tb_cpld_trig_decoder;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic trig_bit = 0, trig_l1_n, trig_l2_n;
  logic [15:0] l1_count, l2_count, false_count;
  cpld_trig_decoder dut (.clk, .rst, .trig_bit, .trig_l1_n, .trig_l2_n, .l1_count, .l2_count, .false_count);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int run1 = 0, run2 = 0, n1 = 0, n2 = 0;
  always @(posedge clk) if (!rst) begin
    if (!trig_l1_n) run1++;
    else if (run1 > 0) begin check(run1 == 10, $sformatf("L1 low %0d clocks", run1)); n1++; run1 = 0; end
    if (!trig_l2_n) run2++;
    else if (run2 > 0) begin check(run2 == 2, $sformatf("L2 low %0d clocks", run2)); n2++; run2 = 0; end
  end
  task automatic pat(input int ones);
    for (int i = 0; i < ones; i++) begin @(negedge clk); trig_bit = 1; end
    @(negedge clk); trig_bit = 0;
    repeat (16 + $urandom_range(0, 5)) @(negedge clk);
  endtask
  initial begin
    int e1 = 0, e2 = 0, ef = 0, k;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (8) @(negedge clk);
    check(trig_l1_n && trig_l2_n, "lines idle high");
    for (int i = 0; i < 60; i++) begin
      k = $urandom_range(1, 3);
      pat(k);
      if (k == 1) e1++; else if (k == 2) e2++; else ef++;
    end
    check(n1 == e1 && l1_count == 16'(e1), $sformatf("L1 %0d/%0d exp %0d", n1, l1_count, e1));
    check(n2 == e2 && l2_count == 16'(e2), $sformatf("L2 %0d/%0d exp %0d", n2, l2_count, e2));
    check(false_count == 16'(ef), $sformatf("false %0d exp %0d", false_count, ef));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
