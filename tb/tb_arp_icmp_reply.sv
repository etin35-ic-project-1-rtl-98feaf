// tb_arp_icmp_reply: self-checking testbench of arp_icmp_reply.
//
// Builds Ethernet frames byte by byte (ARP requests, ICMP echo requests with
// payloads of odd and even length, frames for another IP or MAC, a bad frame,
// a short ping padded to the 60-byte minimum) and collects the reply frames
// under a random tx_ready.  Each expected reply is built here from the
// request, with the ICMP checksum computed from scratch over the reply
// (RFC 1071 sum), and compared byte by byte.  Also checks the ARP-before-ICMP
// order, the drop of a second ping while one is pending, the counters and
// the two-clock start of a reply.
module tb_arp_icmp_reply;
  localparam logic [47:0] MAC = 48'h00_0A_35_00_01_02;
  localparam logic [31:0] IP  = {8'd10, 8'd160, 8'd1, 8'd2};

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [7:0]  rx_data = 0, tx_data;
  logic        rx_dv = 0, rx_good_frame = 0, rx_bad_frame = 0;
  logic        tx_valid, tx_last, tx_ready = 1;
  logic [15:0] arp_replies, icmp_replies, dropped;
  int checks = 0, failures = 0;
  bit random_ready = 1;

  arp_icmp_reply dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- collector ----------------
  typedef logic [7:0] frame_t [$];
  frame_t got [$];
  logic [7:0] cur [$];
  always @(posedge clk) begin
    if (!rst && tx_valid && tx_ready) begin
      cur.push_back(tx_data);
      if (tx_last) begin got.push_back(cur); cur = {}; end
    end
  end
  always @(negedge clk) tx_ready <= random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  // ---------------- frame builders ----------------
  function automatic void put(ref logic [7:0] f [$], input logic [63:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) f.push_back(v[8*i +: 8]);
  endfunction

  function automatic frame_t arp_req(input logic [47:0] dmac, input logic [47:0] smac,
                                     input logic [31:0] sip, input logic [31:0] tip);
    frame_t f;
    put(f, dmac, 6); put(f, smac, 6); put(f, 16'h0806, 2);
    put(f, 64'h0001_0800_0604_0001, 8);
    put(f, smac, 6); put(f, sip, 4); put(f, 48'h0, 6); put(f, tip, 4);
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

  function automatic logic [15:0] csum(input logic [7:0] f [$], input int from, input int to);
    logic [31:0] s = 0;
    for (int i = from; i < to; i++) s += (((i - from) % 2) == 0) ? {f[i], 8'h00} : {8'h00, f[i]};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  function automatic frame_t icmp_req(input logic [47:0] dmac, input logic [47:0] smac,
                                      input logic [31:0] sip, input logic [31:0] dip,
                                      input int plen, input int seed);
    frame_t f;
    logic [15:0] c;
    put(f, dmac, 6); put(f, smac, 6); put(f, 16'h0800, 2);
    put(f, 16'h4500, 2); put(f, 16'(28 + plen), 2); put(f, 32'h1234_0000, 4);
    put(f, 16'h4001, 2); put(f, 16'h0000, 2); put(f, sip, 4); put(f, dip, 4);
    c = csum(f, 14, 34); f[24] = c[15:8]; f[25] = c[7:0];
    put(f, 32'h0800_0000, 4); put(f, 32'(seed), 4);
    for (int i = 0; i < plen; i++) f.push_back(8'(seed * 13 + i * 7));
    c = csum(f, 34, f.size()); f[36] = c[15:8]; f[37] = c[7:0];
    while (f.size() < 60) f.push_back(8'hEE);        // Ethernet padding
    return f;
  endfunction

  function automatic frame_t arp_exp(input logic [47:0] smac, input logic [31:0] sip);
    frame_t f;
    put(f, smac, 6); put(f, MAC, 6); put(f, 16'h0806, 2);
    put(f, 64'h0001_0800_0604_0002, 8);
    put(f, MAC, 6); put(f, IP, 4); put(f, smac, 6); put(f, sip, 4);
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

  function automatic frame_t icmp_exp(input frame_t req);
    frame_t f;
    int n = 14 + {req[16], req[17]};
    logic [15:0] c;
    for (int i = 0; i < n; i++) f.push_back(req[i]);
    for (int i = 0; i < 6; i++) begin f[i] = req[6 + i]; f[6 + i] = req[i]; end
    for (int i = 0; i < 4; i++) begin f[26 + i] = req[30 + i]; f[30 + i] = req[26 + i]; end
    f[34] = 8'h00; f[36] = 0; f[37] = 0;
    c = csum(f, 34, n); f[36] = c[15:8]; f[37] = c[7:0];
    return f;
  endfunction

  task automatic send(input frame_t f, input bit bad = 0);
    foreach (f[i]) begin
      @(negedge clk); rx_dv = 1; rx_data = f[i];
    end
    @(negedge clk); rx_dv = 0;
    if (bad) rx_bad_frame = 1; else rx_good_frame = 1;
    @(negedge clk); rx_good_frame = 0; rx_bad_frame = 0;
  endtask

  task automatic wait_idle();
    repeat (20) @(negedge clk);
    while (tx_valid || dut.arp_pend || dut.icmp_pend) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  function automatic bit same(input frame_t a, input frame_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] !== b[i]) return 0;
    return 1;
  endfunction

  task automatic expect_frames(input frame_t exp [$], input string what);
    check(got.size() == exp.size(), $sformatf("%s: %0d replies, expected %0d", what, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      check(same(got[i], exp[i]), $sformatf("%s: reply %0d differs (len %0d vs %0d)", what, i, got[i].size(), exp[i].size()));
      if (exp[i].size() > 37 && got[i].size() == exp[i].size() && exp[i][12] == 8'h08 && exp[i][13] == 8'h00)
        check(csum(got[i], 34, got[i].size()) == 16'h0000, {what, ": ICMP checksum does not verify"});
    end
    got = {};
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t e [$];
    frame_t r1, r2;
    logic [47:0] pc = 48'h02_11_22_33_44_55;
    logic [31:0] pcip = {8'd10, 8'd160, 8'd1, 8'd100};
    int t0;
    repeat (5) @(negedge clk); rst = 0; repeat (3) @(negedge clk);

    // ARP request, broadcast
    send(arp_req(48'hFFFF_FFFF_FFFF, pc, pcip, IP)); wait_idle();
    e = {arp_exp(pc, pcip)}; expect_frames(e, "ARP broadcast");
    // ARP request sent to our MAC
    send(arp_req(MAC, 48'h02_00_00_00_00_07, 32'h0A0A0A07, IP)); wait_idle();
    e = {arp_exp(48'h02_00_00_00_00_07, 32'h0A0A0A07)}; expect_frames(e, "ARP unicast");
    // ARP for another IP, ARP to another MAC: no reply
    send(arp_req(48'hFFFF_FFFF_FFFF, pc, pcip, IP + 1)); wait_idle();
    send(arp_req(48'h02_00_00_00_00_09, pc, pcip, IP)); wait_idle();
    e = {}; expect_frames(e, "ARP not for us");
    // ICMP echo with several payload lengths
    for (int k = 0; k < 12; k++) begin
      int plen = (k < 4) ? k : $urandom_range(0, 300);
      r1 = icmp_req(MAC, pc + 48'(k), pcip + 32'(k), IP, plen, k + 1);
      send(r1); wait_idle();
      e = {icmp_exp(r1)}; expect_frames(e, $sformatf("ICMP payload %0d", plen));
    end
    // ping to another IP, to another MAC, broadcast MAC, and a bad frame
    send(icmp_req(MAC, pc, pcip, IP + 5, 10, 3)); wait_idle();
    send(icmp_req(48'h02_00_00_00_00_09, pc, pcip, IP, 10, 3)); wait_idle();
    send(icmp_req(48'hFFFF_FFFF_FFFF, pc, pcip, IP, 10, 3)); wait_idle();
    send(icmp_req(MAC, pc, pcip, IP, 10, 3), 1); wait_idle();
    send(arp_req(48'hFFFF_FFFF_FFFF, pc, pcip, IP), 1); wait_idle();
    e = {}; expect_frames(e, "frames not answered");
    check(arp_replies == 2 && icmp_replies == 12, $sformatf("counters %0d %0d", arp_replies, icmp_replies));

    // timing: first byte two clocks after rx_good_frame, ready held high
    random_ready = 0;
    fork
      send(arp_req(48'hFFFF_FFFF_FFFF, pc, pcip, IP));
      begin
        @(posedge rx_good_frame); t0 = 0;
        while (!tx_valid) begin @(negedge clk); t0++; end
        check(t0 == 2, $sformatf("reply starts %0d clocks after the frame end", t0));
      end
    join
    wait_idle(); got = {};
    random_ready = 1;

    // ping then ARP while the echo reply is pending; a second ping is dropped
    random_ready = 0; tx_ready = 0;
    force tx_ready = 0;
    r1 = icmp_req(MAC, pc, pcip, IP, 40, 9);
    r2 = icmp_req(MAC, pc, pcip, IP, 20, 10);
    send(r1);
    send(arp_req(48'hFFFF_FFFF_FFFF, pc, pcip, IP));
    send(r2);
    release tx_ready; random_ready = 1;
    wait_idle();
    e = {icmp_exp(r1), arp_exp(pc, pcip)};
    // the echo reply was already selected before the ARP request came in
    expect_frames(e, "queued replies");
    check(dropped == 1, $sformatf("dropped %0d, expected 1", dropped));
    // after that, pings are answered again
    send(r2); wait_idle();
    e = {icmp_exp(r2)}; expect_frames(e, "ping after drop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
