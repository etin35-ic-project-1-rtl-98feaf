// tb_sru_csr: register writes, read-back replies, command pulses.
module tb_sru_csr;
  import readout_pkg::*;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [31:0] cmd_addr = 0, cmd_data = 0, status = 32'hA5A5_0003, trig_stats = 32'h0002_0007, err_stats = 32'h0001_0004, eth_stats = 32'h0005_0009, reply_addr, reply_data, trig_period;
  logic        cmd_dv = 0, cmd_ack, dcs_src_sel, udp_trig, fast_cmd, word_align, reply_valid;
  logic [1:0]  trig_mode;
  logic [15:0] l2_delay;
  logic [7:0]  fast_cmd_code;
  sru_csr dut (.clk, .rst, .cmd_addr, .cmd_data, .cmd_dv, .cmd_ack, .trig_mode, .trig_period,
    .l2_delay, .dcs_src_sel, .udp_trig, .fast_cmd, .fast_cmd_code, .word_align, .status, .trig_stats, .err_stats, .eth_stats,
    .reply_valid, .reply_addr, .reply_data);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int n_trig = 0, n_fast = 0, n_align = 0;
  always @(negedge clk) begin
    if (udp_trig) n_trig++;
    if (fast_cmd) n_fast++;
    if (word_align) n_align++;
  end
  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); cmd_addr = {16'd0, a}; cmd_data = d; cmd_dv = 1;
    #1 check(cmd_ack, "ack with dv");
    @(negedge clk); cmd_dv = 0;
  endtask
  task automatic rd(input logic [15:0] a, input logic [31:0] expv);
    @(negedge clk); cmd_addr = {1'b1, 15'd0, a}; cmd_data = 0; cmd_dv = 1;
    @(negedge clk); cmd_dv = 0;
    check(reply_valid, "reply valid");
    check(reply_addr == {1'b1, 15'd0, a}, "reply addr");
    check(reply_data == expv, $sformatf("read %h = %h exp %h", a, reply_data, expv));
  endtask
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wr(SRU_CSR_TRIG_MODE, 32'd3);
    wr(SRU_CSR_TRIG_PERIOD, 32'd1234);
    wr(SRU_CSR_L2_DELAY, 32'd77);
    wr(SRU_CSR_CLK_SEL, 32'd1);
    check(trig_mode == 2'd3 && trig_period == 1234 && l2_delay == 77 && dcs_src_sel, "registers");
    rd(SRU_CSR_TRIG_PERIOD, 32'd1234);
    rd(SRU_CSR_L2_DELAY, 32'd77);
    rd(SRU_CSR_STATUS, 32'hA5A5_0003);
    rd(SRU_CSR_TRIG_STATS, 32'h0002_0007);
    rd(SRU_CSR_ERR_STATS, 32'h0001_0004);
    rd(SRU_CSR_ETH_STATS, 32'h0005_0009);
    wr(SRU_CSR_UDP_TRIG, 0);
    wr(SRU_CSR_FAST_CMD, 32'h0000_00B7);
    wr(SRU_CSR_WORD_ALIGN, 0);
    repeat (2) @(negedge clk);
    check(n_trig == 1 && n_fast == 1 && n_align == 1, "one pulse each");
    check(fast_cmd_code == 8'hB7, "fast code");
    rd(SRU_CSR_FAST_CMD, 32'hB7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
