// tb_udp_cmd_dist: checks the NodeSel decoding and the one-clock delay of the
// UDP command distribution.  Frames: one to DTC0 (NodeSel[0]), one to the SRU
// (NodeSel[40]), one to links 25 and 39, one to a wrong port.  Expected
// dcs_rx_dv and dcs_rxd are computed from the frame bytes in the testbench.
module tb_udp_cmd_dist;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0]  udp_rxd = 0, dcs_rxd;
  logic        udp_rx_dv = 0;
  logic [40:0] dcs_rx_dv;

  udp_cmd_dist dut (.clk, .rst, .udp_rxd, .udp_rx_dv, .dcs_rxd, .dcs_rx_dv);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [15:0] port, input logic [40:0] ns, input int npay);
    logic [7:0] b [$];
    logic [31:0] w0, w1;
    logic [40:0] expect_dv;
    w0 = {11'd0, ns[40:20]};
    w1 = {12'd0, ns[19:0]};
    b = {8'h12, 8'h34, port[15:8], port[7:0], 8'h00, 8'(16 + npay), 8'h00, 8'h00,
         w0[31:24], w0[23:16], w0[15:8], w0[7:0], w1[31:24], w1[23:16], w1[15:8], w1[7:0]};
    for (int i = 0; i < npay; i++) b.push_back(8'(i * 5 + 1));
    expect_dv = (port == 16'd4660) ? ns : '0;
    for (int i = 0; i <= b.size(); i++) begin
      @(negedge clk);
      if (i < b.size()) begin udp_rxd = b[i]; udp_rx_dv = 1; end
      else begin udp_rxd = 0; udp_rx_dv = 0; end
      if (i > 0) begin
        // outputs now show byte i-1, one clock late
        check(dcs_rxd == b[i-1], $sformatf("dcs_rxd byte %0d", i-1));
        check(dcs_rx_dv == ((i - 1 >= 16) ? expect_dv : 41'd0),
              $sformatf("dcs_rx_dv byte %0d = %h", i-1, dcs_rx_dv));
      end
    end
    @(negedge clk);
    check(dcs_rx_dv == 0, "dv low after frame");
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    send(16'd4660, 41'h1, 16);
    send(16'd4660, 41'h1 << 40, 8);
    send(16'd4660, (41'h1 << 25) | (41'h1 << 39) | (41'h1 << 20) | (41'h1 << 19), 24);
    send(16'd4661, 41'h1, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
