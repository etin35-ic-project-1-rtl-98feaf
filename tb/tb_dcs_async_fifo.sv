// tb_dcs_async_fifo: bytes written at 125 MHz come out as big-endian 32-bit
// words at 40 MHz in order; full and overflow with a 16-word FIFO.
module tb_dcs_async_fifo;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #4 wclk = ~wclk;
  always #12.5 rclk = ~rclk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        wr_en = 0, rd_en = 0, wr_full, wr_overflow, rd_empty;
  logic [7:0]  wr_data = 0;
  logic [31:0] rd_data;
  dcs_async_fifo #(.AW(4)) dut (.wclk, .wrst, .wr_en, .wr_data, .wr_full, .wr_overflow,
                                .rclk, .rrst, .rd_en, .rd_data, .rd_empty);
  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [7:0] byte_of(input int i); return 8'(i * 37 + 11); endfunction
  task automatic write_bytes(input int first, input int n);
    for (int i = first; i < first + n; i++) begin
      @(negedge wclk); wr_en = 1; wr_data = byte_of(i);
    end
    @(negedge wclk); wr_en = 0;
  endtask
  task automatic read_words(input int first_word, input int n);
    for (int w = first_word; w < first_word + n; w++) begin
      @(negedge rclk);
      check(!rd_empty, $sformatf("word %0d present", w));
      rd_en = 1; @(negedge rclk); rd_en = 0;
      check(rd_data == {byte_of(4*w), byte_of(4*w+1), byte_of(4*w+2), byte_of(4*w+3)},
            $sformatf("word %0d = %h", w, rd_data));
    end
  endtask
  initial begin
    repeat (3) @(negedge rclk);
    wrst = 0; rrst = 0;
    repeat (2) @(negedge rclk);
    check(rd_empty, "empty after reset");
    write_bytes(0, 40);              // 10 words
    repeat (4) @(negedge rclk);
    read_words(0, 10);
    repeat (4) @(negedge rclk);
    check(rd_empty, "empty after reading all");
    write_bytes(40, 4 * 16);         // fill all 16 words
    repeat (2) @(negedge wclk);
    check(wr_full, "full with 16 words");
    check(!wr_overflow, "no overflow yet");
    write_bytes(1000, 4);            // one more word is dropped
    check(wr_overflow, "overflow flagged");
    repeat (4) @(negedge rclk);
    read_words(10, 16);
    repeat (4) @(negedge rclk);
    check(rd_empty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
