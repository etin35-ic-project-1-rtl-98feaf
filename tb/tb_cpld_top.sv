// tb_cpld_top: the front-end CPLD with the behavioural SALTRO chip, driven
// over its DTC trig line by the testbench (commands MSB first on the
// command half, trigger bits on the trigger half) and observed on its two
// return lines, decoded here independently (sync 0xBC50, 16-bit words).
// Checks CSR and SALTRO register replies, L1/L2 delivery, and a channel
// readout arriving as an event frame with the chip's data and a trailer.
// Small sizes: 4 channels, 32-word channel RAM, 64-word event FIFO.
module tb_cpld_top;
  import readout_pkg::*;
  localparam int NCH = 4;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [1:0]  dtc_trig = 0, dtc_data, dtc_return, bd_oe;
  logic [39:0] bd_out, bd_in;
  logic        cstbn, writen, ackn, trsfn, dstbn, errorn, trig_l1_n, trig_l2_n, adc_div4;
  int          l1_seen, l2_seen, chrdo_count, rpinc_count, reg_writes;
  cpld_top #(.NCH(NCH), .CHRAM_AW(5), .FIFO_AW(6)) dut (.clk, .rst, .dtc_trig, .dtc_data, .dtc_return,
    .bd_out, .bd_oe, .bd_in, .cstbn, .writen, .ackn, .trsfn, .dstbn, .errorn, .trig_l1_n,
    .trig_l2_n, .adc_div4);
  saltro_model chip (.clk, .rst, .bd_out, .bd_oe, .bd_in, .cstbn, .writen, .ackn, .trsfn, .dstbn,
    .errorn, .trig_l1_n, .trig_l2_n, .xfer_delay(2), .nwords(3), .l1_seen, .l2_seen,
    .chrdo_count, .rpinc_count, .reg_writes);
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [39:0] word_of(input int ev, input int ch, input int j);
    return {10'(ev), 10'(ch), 10'(j), 10'(ev * 7 + ch * 3 + j)};
  endfunction

  // receiver: 16-bit words after the first sync
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
  task automatic next_frame(output logic [15:0] hdr);
    logic [15:0] w;
    do begin wait (words.size() > 0); w = words.pop_front(); end while (w != WORD_SYNC);
    wait (words.size() > 0); hdr = words.pop_front();
  endtask
  task automatic pop(output logic [15:0] w);
    wait (words.size() > 0); w = words.pop_front();
  endtask

  // command line: serial bytes on dtc_trig[0]
  task automatic send_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin @(negedge clk); dtc_trig[0] = b[i]; end
  endtask
  task automatic send_cmd(input logic [31:0] a, input logic [31:0] d);
    send_byte(CODE_RW);
    for (int i = 3; i >= 0; i--) send_byte(a[8*i +: 8]);
    for (int i = 3; i >= 0; i--) send_byte(d[8*i +: 8]);
    repeat (16) begin @(negedge clk); dtc_trig[0] = 0; end
  endtask
  task automatic trig_bits(input int n);
    for (int i = 0; i < n; i++) begin @(negedge clk); dtc_trig[1] = 1; end
    @(negedge clk); dtc_trig[1] = 0;
  endtask
  task automatic expect_reply(input logic [31:0] a, input logic [31:0] d);
    logic [15:0] h, w0, w1, w2, w3;
    next_frame(h);
    check(h == WORD_REPLY, $sformatf("reply header %h", h));
    pop(w0); pop(w1); pop(w2); pop(w3);
    check({w0, w1} == a && {w2, w3} == d, $sformatf("reply %h%h %h%h", w0, w1, w2, w3));
  endtask

  initial begin
    logic [15:0] h, w0, w1;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    // CPLD CSR write, read; SALTRO register write, read
    send_cmd({2'b00, 10'd0, 20'(CPLD_CSR_CH_MASK)}, 32'h0000_0002);
    send_cmd({2'b00, 10'd0, 20'(CPLD_CSR_ADC_DIV)}, 32'h0000_0001);
    check(adc_div4, "ADC clock select written");
    send_cmd({2'b10, 10'd0, 20'(CPLD_CSR_CH_MASK)}, 0);
    expect_reply({2'b10, 10'd0, 20'(CPLD_CSR_CH_MASK)}, 32'h0000_0002);
    send_cmd({2'b01, 10'd0, 20'h00009}, 32'h000A_BCDE);
    send_cmd({2'b11, 10'd0, 20'h00009}, 0);
    expect_reply({2'b11, 10'd0, 20'h00009}, 32'h000A_BCDE);
    // L1, then L2 (two bits), then the readout command
    trig_bits(1);
    repeat (30) @(negedge clk);
    trig_bits(2);
    repeat (30) @(negedge clk);
    check(l1_seen == 1 && l2_seen == 1, "L1 and L2 reached the chip");
    send_byte(CODE_RDO);
    repeat (8) begin @(negedge clk); dtc_trig[0] = 0; end
    next_frame(h);
    check(h == WORD_EVENT, $sformatf("event header %h", h));
    for (int ch = 0; ch < NCH; ch++) if (ch != 1)
      for (int j = 0; j < 3 + ch % 3; j++) begin
        automatic logic [39:0] w = word_of(1, ch, j);
        automatic logic [31:0] e [2] = '{{6'd0, w[39:30], 6'd0, w[29:20]}, {6'd0, w[19:10], 6'd0, w[9:0]}};
        for (int k = 0; k < 2; k++) begin
          do begin pop(w0); pop(w1); end while ({w0, w1} == EVENT_DUMMY);
          check({w0, w1} == e[k], $sformatf("event ch %0d sample %0d: %h%h exp %h", ch, j, w0, w1, e[k]));
        end
      end
    do begin pop(w0); pop(w1); end while ({w0, w1} == EVENT_DUMMY);
    check({w0, w1} == EVENT_TRAILER, "trailer");
    pop(w0);
    check(w0 == WORD_STATUS, "status frame after the event");
    check(chrdo_count == NCH - 1, "masked channel skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
