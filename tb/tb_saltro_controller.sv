// tb_saltro_controller: the controller drives the behavioural SALTRO model.
// Checks CSR writes and reads over the SALTRO bus, a broadcast write (no
// acknowledge from the chip), channel readouts with a channel mask where the
// event FIFO content must equal the model's samples in order (sample 0
// first, two 32-bit words per 40-bit sample), a small event FIFO read slowly
// so the almost-full stall is exercised, event_done, and abort during a
// readout.
module tb_saltro_controller;
  localparam int NCH = 6, CHRAM_AW = 3, FIFO_AW = 5;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        saltro_cmd_exec = 0, saltro_cmd_rw = 0, saltro_cmd_ack;
  logic [19:0] saltro_cmd_addr = 0, saltro_cmd_rx = 0, saltro_cmd_tx;
  logic        rdo_cmd = 0, abort_cmd = 0, reset_cmd = 0;
  logic [15:0] ch_mask = 0, timeouts;
  logic [39:0] bd_out, bd_in;
  logic [1:0]  bd_oe;
  logic        cstbn, writen, ackn, trsfn, dstbn, errorn;
  logic        fifo_rd_en = 0, fifo_empty, fifo_almost_full, event_done, event_done_clr = 0, rdo_busy, con_busy;
  logic [31:0] fifo_q;
  logic        trig_l1_n = 1, trig_l2_n = 1;
  int          l1_seen, l2_seen, chrdo_count, rpinc_count, reg_writes;
  saltro_controller #(.NCH(NCH), .CHRAM_AW(CHRAM_AW), .FIFO_AW(FIFO_AW)) dut (.*);
  saltro_model chip (.clk, .rst, .bd_out, .bd_oe, .bd_in, .cstbn, .writen, .ackn,
    .trsfn, .dstbn, .errorn, .trig_l1_n, .trig_l2_n, .xfer_delay(2), .nwords(4), .l1_seen, .l2_seen, .chrdo_count,
    .rpinc_count, .reg_writes);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] word_of(input int ev, input int ch, input int j);
    return {10'(ev), 10'(ch), 10'(j), 10'(ev * 7 + ch * 3 + j)};
  endfunction

  // FIFO reader: slow random pops, one clock read latency
  logic [31:0] exp_q [$];
  int n_pop = 0, n_af = 0;
  logic rd_d = 0;
  bit   reader_on = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (rd_d) begin
        check(exp_q.size() > 0, "unexpected FIFO word");
        if (exp_q.size() > 0) begin
          check(fifo_q == exp_q[0], $sformatf("FIFO word %0d = %h exp %h", n_pop, fifo_q, exp_q[0]));
          void'(exp_q.pop_front());
        end
        n_pop++;
      end
      if (fifo_almost_full) n_af++;
    end
    rd_d <= fifo_rd_en;
  end
  always @(negedge clk) fifo_rd_en = reader_on && !fifo_empty && ($urandom_range(0, 7) == 0);

  task automatic csr(input logic rw, input logic [19:0] a, input logic [19:0] d, output logic [19:0] q);
    @(negedge clk); saltro_cmd_exec = 1; saltro_cmd_rw = rw; saltro_cmd_addr = a; saltro_cmd_rx = d;
    while (!saltro_cmd_ack) @(negedge clk);
    q = saltro_cmd_tx;
    saltro_cmd_exec = 0;
    @(negedge clk);
  endtask
  task automatic l2();
    @(negedge clk); trig_l2_n = 0;
    repeat (2) @(negedge clk); trig_l2_n = 1;
  endtask
  task automatic readout(input logic [15:0] mask);
    int ev = l2_seen;
    ch_mask = mask;
    for (int ch = 0; ch < NCH; ch++) if (!mask[ch])
      for (int j = 0; j < 4 + ch % 3; j++) begin
        logic [39:0] w = word_of(ev, ch, j);
        exp_q.push_back({6'd0, w[39:30], 6'd0, w[29:20]});
        exp_q.push_back({6'd0, w[19:10], 6'd0, w[9:0]});
      end
    @(negedge clk); rdo_cmd = 1;
    @(negedge clk); rdo_cmd = 0;
    #1 check(rdo_busy, "busy during readout");
    wait (event_done);
    @(negedge clk);
    wait (exp_q.size() == 0);
    repeat (10) @(negedge clk);
    check(!rdo_busy, "not busy after readout");
    @(negedge clk); event_done_clr = 1;
    @(negedge clk); event_done_clr = 0;
    check(!event_done, "event_done cleared");
  endtask

  initial begin
    logic [19:0] q;
    int c0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    csr(0, 20'h00005, 20'hABCDE, q);
    csr(1, 20'h00005, 0, q);
    check(q == 20'hABCDE, $sformatf("SALTRO register read %h", q));
    csr(1, 20'h00003, 0, q);
    check(q == 20'h00333, "SALTRO reset value read");
    csr(0, 20'h40007, 20'h00077, q);           // broadcast write
    csr(1, 20'h00007, 0, q);
    check(q == 20'h00077, "broadcast write reached the chip");
    check(reg_writes == 2, "two register writes");
    reader_on = 1;
    l2();
    readout(16'h0000);
    check(chrdo_count == NCH, "one CHRDO per channel");
    check(rpinc_count == 1, "RPINC after readout");
    check(n_af > 0, "almost-full stall exercised");
    l2(); l2();
    c0 = chrdo_count;
    readout(16'b010010);
    check(chrdo_count - c0 == NCH - 2, "masked channels skipped");
    // abort: stop the reader so the readout is stuck in the FIFO stall
    reader_on = 0;
    @(negedge clk); rdo_cmd = 1; @(negedge clk); rdo_cmd = 0;
    repeat (300) @(negedge clk);
    check(rdo_busy, "stalled readout still busy");
    @(negedge clk); abort_cmd = 1; @(negedge clk); abort_cmd = 0;
    repeat (3) @(negedge clk);
    check(!rdo_busy && event_done, "abort ends the readout");
    exp_q.delete();
    @(negedge clk); event_done_clr = 1; @(negedge clk); event_done_clr = 0;
    check(timeouts == 0, "no timeouts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
