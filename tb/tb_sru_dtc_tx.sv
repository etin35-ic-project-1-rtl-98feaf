// tb_sru_dtc_tx: the serial command line is decoded independently of the
// design (a byte starts at the first 1 bit on the command half; a 0xE1
// header is followed by 8 more bytes) and compared to the requests made.
// Requests are raised together to check the priority RDO > abort > fast >
// read/write, and also while the transmitter is busy to check none is lost.
module tb_sru_dtc_tx;
  import readout_pkg::*;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [31:0] udp_cmd_addr = 0, udp_cmd_data = 0;
  logic        udp_cmd_dv = 0, udp_cmd_ack, rdo_cmd = 0, abort_cmd = 0, fast_cmd = 0, fee_trig = 0, busy;
  logic [7:0]  fast_cmd_code = 0;
  logic [1:0]  dtc_trig;
  sru_dtc_tx dut (.clk, .rst, .udp_cmd_addr, .udp_cmd_data, .udp_cmd_dv, .udp_cmd_ack,
    .rdo_cmd, .abort_cmd, .fast_cmd, .fast_cmd_code, .fee_trig, .dtc_trig, .busy);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: nrx=%0d", nrx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent line decoder
  logic [71:0] exp_q [$];      // {code, addr, data} or {code, 64'x}
  int          nrx = 0;
  logic [71:0] sh;
  int          nb = 0, need = 0;
  logic        fee_d;
  always @(posedge clk) begin
    fee_d <= fee_trig;
    if (!rst) begin
      if (nb == 0 && dtc_trig[0]) begin
        sh = 72'd1; nb = 1; need = 8;
      end else if (nb > 0) begin
        sh = {sh[70:0], dtc_trig[0]}; nb++;
        if (nb == 8 && sh[7:0] == CODE_RW) need = 72;
        if (nb == need) begin
          if (need == 8) sh = {sh[7:0], 64'd0};
          check(exp_q.size() > 0, "command expected");
          if (exp_q.size() > 0) begin
            check(sh == exp_q[0], $sformatf("got %h exp %h", sh, exp_q[0]));
            void'(exp_q.pop_front());
          end
          nrx++; nb = 0;
        end
      end
    end
  end
  // FeeTrig passes one clock late
  always @(negedge clk) if (!rst) check(dtc_trig[1] == fee_d, "fee_trig half");

  // read/write requester: holds dv until ack
  logic [63:0] rw_q [$];
  initial begin
    bit acked;
    forever begin
      @(posedge clk);
      acked = udp_cmd_dv && udp_cmd_ack;
      @(negedge clk);
      if (acked) udp_cmd_dv = 0;
      if (!udp_cmd_dv && rw_q.size() > 0) begin
        {udp_cmd_addr, udp_cmd_data} = rw_q.pop_front();
        udp_cmd_dv = 1;
      end
    end
  end
  always @(negedge clk) fee_trig = ($urandom_range(0, 7) == 0);

  task automatic pulse_all(input logic [7:0] code, input logic [63:0] rw);
    @(negedge clk);
    rdo_cmd = 1; abort_cmd = 1; fast_cmd = 1; fast_cmd_code = code;
    rw_q.push_back(rw);
    exp_q.push_back({CODE_RDO, 64'd0});
    exp_q.push_back({CODE_ABORT, 64'd0});
    exp_q.push_back({code, 64'd0});
    exp_q.push_back({CODE_RW, rw});
    @(negedge clk);
    rdo_cmd = 0; abort_cmd = 0; fast_cmd = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    pulse_all(CODE_RESET, {32'h4000_0012, 32'hDEAD_BEEF});
    wait (nrx == 4);
    repeat (20) @(negedge clk);
    check(!busy, "idle after commands");
    // one RDO while a read/write is in flight
    rw_q.push_back({32'h8000_0201, 32'h0000_0000});
    exp_q.push_back({CODE_RW, 32'h8000_0201, 32'h0});
    repeat (30) @(negedge clk);
    @(negedge clk); rdo_cmd = 1; exp_q.push_back({CODE_RDO, 64'd0});
    @(negedge clk); rdo_cmd = 0;
    wait (nrx == 6);
    for (int i = 0; i < 3; i++) begin
      pulse_all(8'h80 | 8'($urandom_range(0, 127)), {$urandom(), $urandom()});
      wait (nrx == 10 + 4 * i);
    end
    wait (nrx == 18);
    repeat (100) @(negedge clk);
    check(exp_q.size() == 0, "all commands seen");
    check(nrx == 18, "no extra commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
