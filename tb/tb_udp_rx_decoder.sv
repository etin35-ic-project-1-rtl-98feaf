// tb_udp_rx_decoder: sends Ethernet/IPv4/UDP frames byte by byte and checks
// that matching good frames are replayed from the UDP header on (IP length
// - 20 bytes), and that frames with a wrong MAC, wrong protocol, wrong IP
// or the bad-frame flag are dropped and counted.
module tb_udp_rx_decoder;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [7:0]  rx_data = 0, udp_rxd;
  logic        rx_dv = 0, rx_good_frame = 0, rx_bad_frame = 0, udp_frame, udp_rx_dv, rx_frame_processed;
  logic [15:0] frames_dropped;
  udp_rx_decoder dut (.clk, .rst, .rx_data, .rx_dv, .rx_good_frame, .rx_bad_frame, .udp_frame,
    .udp_rxd, .udp_rx_dv, .rx_frame_processed, .frames_dropped);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] exp_q [$];
  int n_proc = 0, n_got = 0;
  always @(posedge clk) if (!rst) begin
    if (udp_rx_dv) begin
      check(exp_q.size() > 0, "unexpected UDP byte");
      if (exp_q.size() > 0) begin
        check(udp_rxd == exp_q[0], $sformatf("byte %0d = %h exp %h", n_got, udp_rxd, exp_q[0]));
        void'(exp_q.pop_front());
      end
      n_got++;
    end
    if (rx_frame_processed) n_proc++;
  end

  // kind: 0 good, 1 wrong MAC, 2 wrong protocol, 3 wrong IP, 4 bad frame flag
  task automatic send_frame(input int kind, input int payload);
    logic [7:0] f [$];
    int ip_len = 20 + 8 + payload;
    f = '{8'h00, 8'h0A, 8'h35, 8'h00, 8'h01, 8'h02};
    if (kind == 1) f[5] = 8'h03;
    for (int i = 0; i < 6; i++) f.push_back(8'(16 + i));
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'h45); f.push_back(8'h00);
    f.push_back(8'(ip_len >> 8)); f.push_back(8'(ip_len));
    for (int i = 0; i < 5; i++) f.push_back(8'h00);
    f.push_back(kind == 2 ? 8'h06 : 8'h11);
    f.push_back(8'h00); f.push_back(8'h00);
    f.push_back(8'd10); f.push_back(8'd160); f.push_back(8'd1); f.push_back(8'd1);
    f.push_back(8'd10); f.push_back(8'd160); f.push_back(8'd1); f.push_back(kind == 3 ? 8'd9 : 8'd2);
    for (int i = 0; i < 8 + payload; i++) f.push_back(8'($urandom()));
    if (kind == 0) for (int i = 34; i < f.size(); i++) exp_q.push_back(f[i]);
    foreach (f[i]) begin
      @(negedge clk); rx_dv = 1; rx_data = f[i];
    end
    @(negedge clk); rx_dv = 0;
    if (kind == 4) rx_bad_frame = 1; else rx_good_frame = 1;
    @(negedge clk); rx_good_frame = 0; rx_bad_frame = 0;
    repeat (payload + 30) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    send_frame(0, 16);
    check(n_proc == 1 && n_got == 24 && exp_q.size() == 0, "good frame replayed");
    for (int k = 1; k <= 4; k++) send_frame(k, 16);
    check(frames_dropped == 4 && n_proc == 1 && n_got == 24, "bad frames dropped");
    send_frame(0, 4000);
    check(n_proc == 2 && exp_q.size() == 0, "500-command sized frame replayed");
    send_frame(0, 8);
    check(n_proc == 3 && exp_q.size() == 0 && frames_dropped == 4, "small frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
