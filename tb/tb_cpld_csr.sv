// tb_cpld_csr: writes and reads every CPLD register, checks the one-cycle
// ack after exec, the register outputs and the read-only status bits.
module tb_cpld_csr;
  import readout_pkg::*;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        cpld_cmd_exec = 0, cpld_cmd_rnw = 0, cpld_cmd_ack, adc_div4, saltro_error = 0, rdo_busy = 0;
  logic [7:0]  cpld_cmd_addr = 0;
  logic [15:0] cpld_cmd_wdata = 0, cpld_cmd_rdata, ch_mask;
  logic [7:0][15:0] counters;
  cpld_csr dut (.clk, .rst, .cpld_cmd_exec, .cpld_cmd_rnw, .cpld_cmd_addr, .cpld_cmd_wdata,
    .cpld_cmd_rdata, .cpld_cmd_ack, .ch_mask, .adc_div4, .saltro_error, .rdo_busy, .counters);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int n_ack = 0;
  always @(posedge clk) if (!rst && cpld_cmd_ack) n_ack++;
  task automatic access(input logic rnw, input logic [7:0] a, input logic [15:0] d, output logic [15:0] q);
    int n0 = n_ack;
    @(negedge clk); cpld_cmd_exec = 1; cpld_cmd_rnw = rnw; cpld_cmd_addr = a; cpld_cmd_wdata = d;
    #1 check(!cpld_cmd_ack, "no ack in the exec cycle");
    @(negedge clk);
    check(cpld_cmd_ack, "ack one clock after exec");
    q = cpld_cmd_rdata;
    // exec stays high for a few clocks more (held until the demux sees the ack)
    repeat (3) @(negedge clk);
    cpld_cmd_exec = 0;
    @(negedge clk);
    check(n_ack == n0 + 1, "exactly one ack");
  endtask
  initial begin
    logic [15:0] q;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(ch_mask == 0 && !adc_div4, "reset values");
    access(0, CPLD_CSR_CH_MASK, 16'h00F0, q);
    access(0, CPLD_CSR_ADC_DIV, 16'h0001, q);
    access(0, CPLD_CSR_SCRATCH, 16'hBEEF, q);
    check(ch_mask == 16'h00F0 && adc_div4, "register outputs");
    access(1, CPLD_CSR_CH_MASK, 0, q);  check(q == 16'h00F0, "read ch_mask");
    access(1, CPLD_CSR_ADC_DIV, 0, q);  check(q == 16'h0001, "read adc_div");
    access(1, CPLD_CSR_SCRATCH, 0, q);  check(q == 16'hBEEF, "read scratch");
    saltro_error = 1; rdo_busy = 0;
    access(1, CPLD_CSR_STATUS, 0, q);   check(q == 16'h0001, "status error");
    saltro_error = 0; rdo_busy = 1;
    access(1, CPLD_CSR_STATUS, 0, q);   check(q == 16'h0002, "status busy");
    for (int i = 0; i < 8; i++) counters[i] = 16'($urandom());
    for (int i = 0; i < 8; i++) begin
      access(1, CPLD_CSR_COUNTERS + 8'(i), 0, q);
      check(q == counters[i], $sformatf("counter %0d", i));
    end
    access(0, CPLD_CSR_STATUS, 16'hFFFF, q);
    access(1, CPLD_CSR_STATUS, 0, q);   check(q == 16'h0002, "status read-only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
