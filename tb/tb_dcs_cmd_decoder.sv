// tb_dcs_cmd_decoder: command bytes at 125 MHz come out as address/data
// pairs at 40 MHz, held until acked, spaced by the 160-clock watchdog.
// Two packets (2 and 3 commands); the acknowledging transmitter is modelled
// in the testbench with a fixed 5-clock answer.
module tb_dcs_cmd_decoder;
  logic eth_clk = 0, dtc_clk = 0, eth_rst = 1, dtc_rst = 1;
  always #4 eth_clk = ~eth_clk;
  always #12.5 dtc_clk = ~dtc_clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [7:0]  dcs_rxd = 0;
  logic        dcs_rx_dv = 0, udp_cmd_dv, udp_cmd_ack = 0, fifo_overflow;
  logic [31:0] udp_cmd_addr, udp_cmd_data;
  dcs_cmd_decoder dut (.eth_clk, .eth_rst, .dcs_rxd, .dcs_rx_dv, .dtc_clk, .dtc_rst,
    .udp_cmd_addr, .udp_cmd_data, .udp_cmd_dv, .udp_cmd_ack, .fifo_overflow);
  initial begin
    repeat (20000) @(posedge dtc_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_a [$], exp_d [$];
  int got = 0, cyc = 0, last_ack = -1000;
  always @(posedge dtc_clk) cyc++;

  // transmitter model: acks 5 clocks after dv rises
  initial begin
    forever begin
      @(posedge dtc_clk);
      if (udp_cmd_dv && !dtc_rst) begin
        check(cyc - last_ack >= 160, $sformatf("spacing %0d >= 160", cyc - last_ack));
        check(exp_a.size() > 0, "command expected");
        if (exp_a.size() > 0) begin
          check(udp_cmd_addr == exp_a[0], $sformatf("addr %h exp %h", udp_cmd_addr, exp_a[0]));
          check(udp_cmd_data == exp_d[0], $sformatf("data %h exp %h", udp_cmd_data, exp_d[0]));
          void'(exp_a.pop_front()); void'(exp_d.pop_front());
        end
        repeat (4) @(posedge dtc_clk);
        check(udp_cmd_dv, "dv held until ack");
        @(negedge dtc_clk); udp_cmd_ack = 1;
        @(negedge dtc_clk); udp_cmd_ack = 0;
        last_ack = cyc;
        got++;
      end
    end
  end

  task automatic send_packet(input int n, input int seed);
    logic [31:0] a, d;
    for (int i = 0; i < n; i++) begin
      a = {1'b0, 1'b1, 10'd0, 20'(seed * 16 + i)};
      d = 32'h1234_0000 + 32'(seed * 256 + i);
      exp_a.push_back(a); exp_d.push_back(d);
      for (int b = 0; b < 8; b++) begin
        @(negedge eth_clk);
        dcs_rx_dv = 1;
        dcs_rxd = (b < 4) ? a[31 - 8*b -: 8] : d[31 - 8*(b-4) -: 8];
      end
    end
    @(negedge eth_clk); dcs_rx_dv = 0;
  endtask

  initial begin
    repeat (4) @(negedge dtc_clk);
    eth_rst = 0; dtc_rst = 0;
    repeat (4) @(negedge dtc_clk);
    send_packet(2, 1);
    wait (got == 2);
    repeat (400) @(negedge dtc_clk);
    check(!udp_cmd_dv, "idle after first packet");
    send_packet(3, 2);
    wait (got == 5);
    repeat (400) @(negedge dtc_clk);
    check(exp_a.size() == 0, "all commands delivered");
    check(!fifo_overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
