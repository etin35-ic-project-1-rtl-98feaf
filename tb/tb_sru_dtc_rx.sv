// tb_sru_dtc_rx: drives the 4-bit-per-clock line from the CPLD with reply,
// status and event frames (with dummy words, trailer and the status frame
// that follows an event), then checks the reply outputs, the error flag,
// the readout RAM contents and word count, event dropping while the RAM is
// full, release by rd_confirm, RAM overflow and re-alignment on a shifted
// word boundary.  Uses a 16-word RAM so overflow is reached quickly.
module tb_sru_dtc_rx;
  import readout_pkg::*;
  localparam int AW = 4;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [3:0]    dtc_rx = 0;
  logic          word_align = 0, aligned, ram_flag, rd_confirm = 0, err_flag, reply_valid, ram_overflow;
  logic [AW-1:0] ram_rd_addr = 0;
  logic [31:0]   ram_rd_data, reply_addr, reply_data;
  logic [AW:0]   word_count;
  logic [7:0]    dropped_events;
  sru_dtc_rx #(.RAM_AW(AW)) dut (.clk, .rst, .dtc_rx, .word_align, .aligned, .ram_rd_addr,
    .ram_rd_data, .ram_flag, .word_count, .rd_confirm, .err_flag, .reply_valid, .reply_addr,
    .reply_data, .ram_overflow, .dropped_events);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_reply = 0;
  logic [31:0] last_ra, last_rd;
  always @(negedge clk) if (reply_valid) begin n_reply++; last_ra = reply_addr; last_rd = reply_data; end

  // line driver: sends queued words back to back, idle words otherwise, so
  // the word boundary never slips; an entry with bit 16 set is one nibble
  logic [16:0] txq [$];
  initial begin
    logic [16:0] e;
    forever begin
      e = (txq.size() > 0) ? txq.pop_front() : {1'b0, WORD_IDLE};
      if (e[16]) begin
        @(negedge clk); dtc_rx = e[3:0];
      end else begin
        for (int i = 3; i >= 0; i--) begin @(negedge clk); dtc_rx = e[4*i +: 4]; end
      end
    end
  end
  task automatic drain();
    wait (txq.size() == 0);
    repeat (12) @(negedge clk);
  endtask
  task automatic nib(input logic [3:0] n);
    txq.push_back({13'h1000, n});
  endtask
  task automatic w16(input logic [15:0] w);
    txq.push_back({1'b0, w});
  endtask
  task automatic w32(input logic [31:0] w);
    w16(w[31:16]); w16(w[15:0]);
  endtask
  task automatic idle(input int n);
    for (int i = 0; i < n; i++) w16(WORD_IDLE);
  endtask
  logic [31:0] ev [$];
  task automatic send_event(input int n);
    ev.delete();
    w16(WORD_SYNC); w16(WORD_EVENT);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 2) == 0) w32(EVENT_DUMMY);
      ev.push_back({4'h1, 28'($urandom())});
      w32(ev[i]);
    end
    w32(EVENT_DUMMY);
    w32(EVENT_TRAILER);
    w16(WORD_STATUS); w16(16'h0000); w16(16'h0000);
    idle(2);
    drain();
  endtask
  task automatic check_ram(input int n, input string tag);
    check(ram_flag, {tag, ": ram_flag"});
    check(word_count == (AW+1)'(n), $sformatf("%s: word_count %0d exp %0d", tag, word_count, n));
    for (int i = 0; i < n && i < 2**AW; i++) begin
      @(negedge clk); ram_rd_addr = AW'(i);
      @(negedge clk);
      check(ram_rd_data == ev[i], $sformatf("%s: word %0d %h exp %h", tag, i, ram_rd_data, ev[i]));
    end
  endtask
  task automatic confirm();
    @(negedge clk); rd_confirm = 1;
    @(negedge clk); rd_confirm = 0;
    check(!ram_flag, "ram_flag cleared by rd_confirm");
  endtask

  logic [31:0] keep [$];
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    idle(2); nib(4'h3); nib(4'h7);
    drain();
    check(!aligned, "not aligned before sync");
    w16(WORD_SYNC);
    drain();
    check(aligned, "aligned after sync");
    // reply frame
    w16(WORD_SYNC); w16(WORD_REPLY); w32(32'h8001_0060); w32(32'h0001_2345); drain();
    check(n_reply == 1, "one reply");
    check(last_ra == 32'h8001_0060 && last_rd == 32'h0001_2345, "reply fields");
    // status frame with error bit
    w16(WORD_SYNC); w16(WORD_STATUS); w16(16'h0000); w16(16'h0001); drain();
    check(err_flag, "status error flag set");
    w16(WORD_SYNC); w16(WORD_STATUS); w16(16'h0000); w16(16'h0000); drain();
    check(!err_flag, "status error flag cleared");
    // event
    send_event(5);
    check_ram(5, "event1");
    keep = ev;
    // second event while the RAM is full is dropped
    send_event(3);
    check(dropped_events == 1, "dropped while full");
    ev = keep;
    check_ram(5, "event1 kept");
    confirm();
    send_event(9);
    check_ram(9, "event3");
    confirm();
    // empty event
    send_event(0);
    check(ram_flag && word_count == 0, "empty event");
    confirm();
    // overflow
    check(!ram_overflow, "no overflow yet");
    send_event(2**AW + 3);
    check(ram_overflow, "overflow flagged");
    check_ram(2**AW, "full event");
    confirm();
    // re-align on a word boundary shifted by one nibble
    @(negedge clk); word_align = 1;
    @(negedge clk); word_align = 0;
    #1 check(!aligned, "word_align restarts alignment");
    nib(4'h0);
    idle(1);
    w16(WORD_SYNC);
    drain();
    check(aligned, "re-aligned");
    send_event(4);
    check_ram(4, "after realign");
    confirm();
    check(n_reply == 1, "no spurious reply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
