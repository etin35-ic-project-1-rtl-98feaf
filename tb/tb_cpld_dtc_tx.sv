// tb_cpld_dtc_tx: decodes the 4-bit-per-clock output independently (word
// boundary from the first 0xBC50, then one 16-bit word per four clocks) and
// checks status, reply and event frames.  The event FIFO is modelled with
// one clock read latency and filled slowly, so dummy words appear between
// data words; event_done is raised after the last word and must give the
// trailer, a status frame and one event_done_clr pulse.
module tb_cpld_dtc_tx;
  import readout_pkg::*;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        reply_rdy = 0, frame_state, status_req = 0, fifo_empty, fifo_rd_en, event_done = 0, event_done_clr;
  logic [31:0] reply_addr = 0, reply_data = 0, fifo_q;
  logic [15:0] status_bits = 0, event_frames, dummy_words;
  logic [1:0]  dtc_data, dtc_return;
  cpld_dtc_tx dut (.*);
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // FIFO model
  logic [31:0] fifo [64];
  int          wp = 0, rp = 0;
  assign fifo_empty = (wp == rp);
  always @(posedge clk) if (fifo_rd_en) begin
    check(wp != rp, "read from empty FIFO");
    fifo_q <= fifo[rp % 64];
    rp <= rp + 1;
  end
  always @(posedge clk) if (event_done_clr) event_done <= 0;
  int n_clr = 0;
  always @(posedge clk) if (!rst && event_done_clr) n_clr++;

  // independent receiver
  logic [15:0] win = 0;
  int          phase = -1;
  logic [15:0] words [$];
  always @(posedge clk) if (!rst) begin
    win = {win[11:0], dtc_data, dtc_return};
    if (phase < 0) begin
      if (win == WORD_SYNC) begin phase = 0; words.push_back(win); end
    end else begin
      phase = (phase + 1) % 4;
      if (phase == 0) words.push_back(win);
    end
  end
  task automatic expect_words(input logic [15:0] exp [$], input string tag);
    // skip idle words, then compare
    wait (words.size() > 0);
    while (words[0] == WORD_IDLE) begin
      void'(words.pop_front());
      wait (words.size() > 0);
    end
    foreach (exp[i]) begin
      wait (words.size() > 0);
      check(words[0] == exp[i], $sformatf("%s word %0d = %h exp %h", tag, i, words[0], exp[i]));
      void'(words.pop_front());
    end
  endtask

  initial begin
    logic [31:0] ev [$];
    int nd;
    logic [15:0] w;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    // status frame
    status_bits = 16'h0001;
    @(negedge clk); status_req = 1; @(negedge clk); status_req = 0;
    expect_words('{WORD_SYNC, WORD_STATUS, 16'h0000, 16'h0001}, "status");
    // reply frame; reply_rdy drops when frame_state rises (reply_rdy FSM)
    reply_addr = 32'h8000_0060; reply_data = 32'h0000_BEEF;
    @(negedge clk); reply_rdy = 1;
    wait (frame_state); @(negedge clk); reply_rdy = 0;
    expect_words('{WORD_SYNC, WORD_REPLY, 16'h8000, 16'h0060, 16'h0000, 16'hBEEF}, "reply");
    check(!frame_state, "frame_state low after reply");
    // event: words arrive slowly
    for (int i = 0; i < 12; i++) ev.push_back($urandom());
    fork
      begin
        foreach (ev[i]) begin
          repeat ($urandom_range(0, 20)) @(negedge clk);
          fifo[wp % 64] = ev[i]; wp = wp + 1;
        end
        repeat (30) @(negedge clk);
        event_done = 1;
      end
      begin
        expect_words('{WORD_SYNC, WORD_EVENT}, "event header");
        nd = 0;
        foreach (ev[i]) begin
          forever begin
            wait (words.size() >= 2);
            w = words.pop_front();
            if ({w, words[0]} == EVENT_DUMMY) begin void'(words.pop_front()); nd++; end
            else break;
          end
          check({w, words[0]} == ev[i], $sformatf("event word %0d = %h%h exp %h", i, w, words[0], ev[i]));
          void'(words.pop_front());
        end
        // dummies until event_done, then the trailer
        forever begin
          wait (words.size() >= 2);
          w = words.pop_front();
          if ({w, words[0]} == EVENT_DUMMY) begin void'(words.pop_front()); nd++; end
          else break;
        end
        check({w, words[0]} == EVENT_TRAILER, "trailer");
        void'(words.pop_front());
        expect_words('{WORD_STATUS, 16'h0000, 16'h0001}, "status after event");
      end
    join
    check(nd > 0 && 16'(nd) == dummy_words, $sformatf("dummy words %0d counter %0d", nd, dummy_words));
    check(n_clr == 1 && !event_done, "one event_done_clr");
    check(event_frames == 1, "event frame counter");
    // an event that ended with no data: header, trailer, status
    @(negedge clk); event_done = 1;
    expect_words('{WORD_SYNC, WORD_EVENT, EVENT_TRAILER[31:16], EVENT_TRAILER[15:0], WORD_STATUS}, "empty event");
    check(n_clr == 2, "second event_done_clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
