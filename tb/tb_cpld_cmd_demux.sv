// tb_cpld_cmd_demux: random read/write commands with random CType are routed
// to two target models (CSR-like and SALTRO-like, different ack delays);
// checks the routing, the field widths, the returned ack, the packed reply
// of reads, and the reply_rdy handshake with a frame_state model.
module tb_cpld_cmd_demux;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        dtc_cmd_exec = 0, dtc_cmd_rnw = 0, dtc_cmd_feenal = 0, dtc_cmd_ack;
  logic [19:0] dtc_cmd_addr = 0, dtc_cmd_data = 0;
  logic        cpld_cmd_exec, cpld_cmd_rnw, cpld_cmd_ack = 0;
  logic [7:0]  cpld_cmd_addr;
  logic [15:0] cpld_cmd_wdata, cpld_cmd_rdata = 0;
  logic        saltro_cmd_exec, saltro_cmd_rw, saltro_cmd_ack = 0;
  logic [19:0] saltro_cmd_addr, saltro_cmd_rx, saltro_cmd_tx = 0;
  logic [31:0] reply_addr, reply_data;
  logic        reply_rdy, frame_state = 0;
  cpld_cmd_demux dut (.*);
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // target models
  int n_csr = 0, n_sal = 0;
  initial forever begin
    @(negedge clk);
    cpld_cmd_ack = 0;
    if (cpld_cmd_exec && !cpld_cmd_ack) begin
      check(!saltro_cmd_exec, "one target at a time");
      check(cpld_cmd_addr == dtc_cmd_addr[7:0] && cpld_cmd_wdata == dtc_cmd_data[15:0]
            && cpld_cmd_rnw == dtc_cmd_rnw, "csr fields");
      cpld_cmd_rdata = ~{8'h00, cpld_cmd_addr};
      cpld_cmd_ack = 1; n_csr++;
      @(negedge clk); cpld_cmd_ack = 0;
      @(negedge clk);
    end
  end
  initial forever begin
    @(negedge clk);
    if (saltro_cmd_exec) begin
      check(saltro_cmd_addr == dtc_cmd_addr && saltro_cmd_rx == dtc_cmd_data
            && saltro_cmd_rw == dtc_cmd_rnw, "saltro fields");
      repeat ($urandom_range(1, 5)) @(negedge clk);
      saltro_cmd_tx = saltro_cmd_addr ^ 20'h12345;
      saltro_cmd_ack = 1; n_sal++;
      @(negedge clk); saltro_cmd_ack = 0;
      @(negedge clk);
    end
  end
  // DTC TX model: answers reply_rdy with a 24-clock frame
  int n_frames = 0;
  logic [31:0] exp_ra, exp_rd;
  initial forever begin
    @(negedge clk);
    if (reply_rdy) begin
      check(reply_addr == exp_ra && reply_data == exp_rd,
            $sformatf("reply %h %h exp %h %h", reply_addr, reply_data, exp_ra, exp_rd));
      repeat ($urandom_range(0, 6)) @(negedge clk);
      frame_state = 1;
      repeat (24) begin
        @(negedge clk);
        check(!reply_rdy, "no reply_rdy during frame");
      end
      frame_state = 0; n_frames++;
    end
  end
  int n_acks = 0;
  always @(posedge clk) if (!rst && dtc_cmd_ack) n_acks++;
  initial begin
    int e_csr = 0, e_sal = 0, e_rd = 0, n0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      dtc_cmd_rnw = 1'($urandom()); dtc_cmd_feenal = 1'($urandom());
      dtc_cmd_addr = 20'($urandom()); dtc_cmd_data = 20'($urandom());
      if (dtc_cmd_rnw) begin
        e_rd++;
        exp_ra = {dtc_cmd_rnw, dtc_cmd_feenal, 10'd0, dtc_cmd_addr};
        exp_rd = dtc_cmd_feenal ? {12'd0, dtc_cmd_addr ^ 20'h12345} : {16'd0, ~{8'h00, dtc_cmd_addr[7:0]}};
      end
      if (dtc_cmd_feenal) e_sal++; else e_csr++;
      n0 = n_acks;
      dtc_cmd_exec = 1;
      wait (n_acks == n0 + 1);
      @(negedge clk); dtc_cmd_exec = 0;
      // like the SRU, wait for the reply frame before the next command
      wait (n_frames == e_rd);
      repeat (4) @(negedge clk);
    end
    check(n_csr == e_csr && n_sal == e_sal, "command counts per target");
    check(n_acks == 60, "one ack per command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
