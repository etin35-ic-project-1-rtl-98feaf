// tb_readout_fsm: a RAM model with one clock read latency feeds the FSM;
// events of random size are streamed with random tready.  The byte stream
// is checked against the RAM words (LSB first), tuser against 4 x words,
// tlast on the last byte only, and one rd_confirm per event.
module tb_readout_fsm;
  localparam int AW = 6;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic          ram_flag = 0, rd_confirm, tvalid, tready = 0, tlast;
  logic [AW:0]   word_count = 0;
  logic [AW-1:0] ram_rd_addr;
  logic [31:0]   ram_rd_data, mem [2**AW];
  logic [7:0]    tdata;
  logic [15:0]   tuser;
  readout_fsm #(.RAM_AW(AW)) dut (.clk, .rst, .ram_flag, .word_count, .ram_rd_addr,
    .ram_rd_data, .rd_confirm, .tdata, .tvalid, .tready, .tlast, .tuser);
  always_ff @(posedge clk) ram_rd_data <= mem[ram_rd_addr];
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) tready = ($urandom_range(0, 3) != 0);

  int nbytes = 0, nconf = 0, nlast = 0, ev_words = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (tvalid && tready) begin
        check(tdata == mem[nbytes / 4][8 * (nbytes % 4) +: 8],
              $sformatf("byte %0d = %h", nbytes, tdata));
        check(tuser == 16'(4 * ev_words), "tuser");
        check(tlast == (nbytes == 4 * ev_words - 1), $sformatf("tlast at byte %0d", nbytes));
        if (tlast) nlast++;
        nbytes++;
      end
      if (rd_confirm) nconf++;
    end
  end

  initial begin
    int sizes [6] = '{1, 2, 7, 0, 64, 33};
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (sizes[e]) begin
      for (int i = 0; i < 2**AW; i++) mem[i] = $urandom();
      ev_words = sizes[e]; nbytes = 0;
      @(negedge clk); word_count = (AW+1)'(sizes[e]); ram_flag = 1;
      wait (nconf == e + 1);
      @(negedge clk); ram_flag = 0;
      check(nbytes == 4 * sizes[e], $sformatf("event %0d: %0d bytes", e, nbytes));
      repeat (5) @(negedge clk);
      check(nconf == e + 1, "one confirm per event");
    end
    check(nlast == 5, "tlast count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
