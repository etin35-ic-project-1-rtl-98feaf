// tb_trigger_gen: decodes the FeeTrig bit stream (a lone 1 = L1, two
// consecutive 1s = L2) and checks the L1-to-L2 distance, the RDO pulse after
// L2, the abort instead of L2 when busy, the minimum L2 delay, and the three
// trigger sources (CSR pulse, periodic, external edge).
module tb_trigger_gen;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [1:0]  trig_mode = 0;
  logic [31:0] trig_period = 100;
  logic [15:0] l2_delay = 20, trig_count, abort_count, missed;
  logic        udp_trig = 0, ext_trig = 0, busy = 0, fee_trig, rdo_cmd, abort_cmd;
  trigger_gen dut (.clk, .rst, .trig_mode, .trig_period, .l2_delay, .udp_trig, .ext_trig,
    .busy, .fee_trig, .rdo_cmd, .abort_cmd, .trig_count, .abort_count, .missed);
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, run = 0, t_l1 = -1, t_l2 = -1, n_l1 = 0, n_l2 = 0, n_rdo = 0, n_abort = 0;
  int exp_dist = 20;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (fee_trig) run++;
      else if (run > 0) begin
        if (run == 1) begin n_l1++; t_l1 = cyc - 2; end
        else if (run == 2) begin
          n_l2++; t_l2 = cyc - 3;
          check(t_l2 - t_l1 == exp_dist, $sformatf("L1-L2 distance %0d exp %0d", t_l2 - t_l1, exp_dist));
        end else check(0, "fee_trig run longer than 2");
        run = 0;
      end
      if (rdo_cmd) begin
        n_rdo++;
        check(cyc - 1 - t_l2 == 2 || cyc - 1 - (t_l1 + exp_dist) == 2, "rdo two clocks after L2 start");
      end
      if (abort_cmd) n_abort++;
    end
  end

  task automatic pulse_udp();
    @(negedge clk); udp_trig = 1;
    @(negedge clk); udp_trig = 0;
    repeat (60) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    pulse_udp();
    check(n_l1 == 1 && n_l2 == 1 && n_rdo == 1 && n_abort == 0, "udp trigger: L1, L2, RDO");
    busy = 1;
    pulse_udp();
    check(n_l1 == 2 && n_l2 == 1 && n_rdo == 1 && n_abort == 1, "busy: abort instead of L2");
    check(abort_count == 1, "abort counter");
    busy = 0;
    l2_delay = 3; exp_dist = 16;
    pulse_udp();
    check(n_l2 == 2, "min L2 delay L2");
    l2_delay = 20; exp_dist = 20;
    // periodic, 100 clocks
    trig_mode = 2'b01;
    repeat (1000) @(negedge clk);
    trig_mode = 2'b00;
    repeat (60) @(negedge clk);
    check(n_l1 >= 12 && n_l1 <= 14, $sformatf("periodic: %0d triggers", n_l1 - 3));
    check(n_l2 == n_l1 - 1, "periodic: every trigger gets L2");
    // external: ignored unless enabled, then one trigger per rising edge
    for (int i = 0; i < 3; i++) begin
      ext_trig = 1; repeat (10) @(negedge clk); ext_trig = 0; repeat (60) @(negedge clk);
    end
    check(trig_count == 16'(n_l1), "ext ignored when disabled");
    trig_mode = 2'b10;
    for (int i = 0; i < 4; i++) begin
      ext_trig = 1; repeat (10) @(negedge clk); ext_trig = 0; repeat (60) @(negedge clk);
    end
    check(trig_count == 16'(n_l1) && n_l1 >= 16, $sformatf("ext triggers %0d", n_l1));
    check(n_rdo == n_l2, "one RDO per L2");
    // a trigger during a sequence is counted as missed
    trig_mode = 0;
    @(negedge clk); udp_trig = 1; @(negedge clk); udp_trig = 0;
    repeat (5) @(negedge clk); udp_trig = 1; @(negedge clk); udp_trig = 0;
    repeat (60) @(negedge clk);
    check(missed == 1, "missed trigger counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
