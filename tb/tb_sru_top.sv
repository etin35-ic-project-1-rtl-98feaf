// tb_sru_top: the SRU with three DTC links and small memories.  Command
// frames arrive on the Ethernet input; the testbench decodes the serial
// command lines of the links, answers on link 2 with a reply frame and on
// link 0 with event frames, and takes the AXI4-Stream.  Checks: node
// selection (a command only on the selected links), SRU CSR reply, L1/L2
// trigger bits and the RDO command on every link after a CSR trigger, the
// event packet bytes, tuser and tlast, and that link 1's events are
// discarded without blocking.
module tb_sru_top;
  import readout_pkg::*;
  localparam int NL = 3, AW = 6;
  logic eth_clk = 0, dtc_clk = 0, eth_rst = 1, dtc_rst = 1;
  always #4 eth_clk = ~eth_clk;
  always #12.5 dtc_clk = ~dtc_clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [7:0]  rx_data = 0, tdata;
  logic        rx_dv = 0, rx_good_frame = 0, rx_bad_frame = 0, ext_trig = 0;
  logic [7:0]  eth_tx_data;
  logic        eth_tx_valid, eth_tx_last;
  logic        eth_tx_ready = 1;
  logic [1:0]  dtc_trig [NL];
  logic [3:0]  dtc_rx [NL];
  logic        tvalid, tready = 1, tlast, sru_reply_valid, dcs_src_sel;
  logic [15:0] tuser;
  logic [NL-1:0] link_reply_valid, err_flags;
  logic [31:0] link_reply_addr [NL], link_reply_data [NL], sru_reply_addr, sru_reply_data;
  sru_top #(.NLINKS(NL), .RAM_AW(AW), .CMD_AW(6)) dut (.*);
  initial begin
    repeat (100000) @(posedge dtc_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-link serial decoders
  int n_rw [NL], n_rdo [NL], n_l1 [NL], n_l2 [NL];
  for (genvar k = 0; k < NL; k++) begin : g_dec
    logic [7:0] sh;
    int nb = 0, skip = 0, run = 0;
    initial begin n_rw[k] = 0; n_rdo[k] = 0; n_l1[k] = 0; n_l2[k] = 0; end
    always @(posedge dtc_clk) if (!dtc_rst) begin
      if (skip > 0) skip--;
      else if (nb == 0 && dtc_trig[k][0]) begin sh = 8'd1; nb = 1; end
      else if (nb > 0) begin
        sh = {sh[6:0], dtc_trig[k][0]}; nb++;
        if (nb == 8) begin
          if (sh == CODE_RW) begin n_rw[k]++; skip = 64; end
          if (sh == CODE_RDO) n_rdo[k]++;
          nb = 0;
        end
      end
      if (dtc_trig[k][1]) run++;
      else begin
        if (run == 1) n_l1[k]++;
        if (run == 2) n_l2[k]++;
        run = 0;
      end
    end
  end

  // line drivers for links 0..2 (words back to back, idle otherwise)
  logic [15:0] txq [NL][$];
  for (genvar k = 0; k < NL; k++) begin : g_drv
    initial begin
      logic [15:0] w;
      dtc_rx[k] = 0;
      forever begin
        w = (txq[k].size() > 0) ? txq[k].pop_front() : WORD_IDLE;
        for (int i = 3; i >= 0; i--) begin @(negedge dtc_clk); dtc_rx[k] = w[4*i +: 4]; end
      end
    end
  end
  task automatic send_words(input int k, input logic [31:0] ws [$], input bit hdr32);
    foreach (ws[i]) begin txq[k].push_back(ws[i][31:16]); txq[k].push_back(ws[i][15:0]); end
  endtask

  // AXI sink
  logic [7:0] pkt [$], exp_pkt [$];
  int n_pkt = 0;
  always @(posedge dtc_clk) if (!dtc_rst && tvalid && tready) begin
    pkt.push_back(tdata);
    if (tlast) begin
      check(pkt == exp_pkt, $sformatf("packet %0d bytes (exp %0d)", pkt.size(), exp_pkt.size()));
      check(tuser == 16'(exp_pkt.size()), "tuser");
      pkt.delete(); n_pkt++;
    end
  end
  int n_sru = 0, n_lr = 0;
  always @(posedge dtc_clk) if (!dtc_rst) begin
    if (sru_reply_valid) begin
      n_sru++;
      check(sru_reply_data == 32'd64, $sformatf("SRU reply data %h (reset L2 delay)", sru_reply_data));
    end
    if (link_reply_valid[2]) begin
      n_lr++;
      check(link_reply_addr[2] == 32'h8000_0060 && link_reply_data[2] == 32'h0000_1234, "link 2 reply");
    end
  end

  task automatic send_frame(input logic [40:0] nodesel, input logic [63:0] cmds [$]);
    logic [7:0] f [$];
    int ip_len = 36 + 8 * cmds.size();
    f = '{8'h00, 8'h0A, 8'h35, 8'h00, 8'h01, 8'h02, 1, 2, 3, 4, 5, 6, 8'h08, 8'h00, 8'h45, 0,
          8'(ip_len >> 8), 8'(ip_len), 0, 0, 0, 0, 0, 8'h11, 0, 0, 10, 160, 1, 100, 10, 160, 1, 2,
          0, 1, 8'h12, 8'h34, 8'((ip_len - 20) >> 8), 8'(ip_len - 20), 0, 0,
          0, {3'd0, nodesel[40:36]}, nodesel[35:28], nodesel[27:20],
          0, {4'd0, nodesel[19:16]}, nodesel[15:8], nodesel[7:0]};
    foreach (cmds[c]) for (int i = 7; i >= 0; i--) f.push_back(cmds[c][8*i +: 8]);
    foreach (f[i]) begin @(negedge eth_clk); rx_dv = 1; rx_data = f[i]; end
    @(negedge eth_clk); rx_dv = 0; rx_good_frame = 1;
    @(negedge eth_clk); rx_good_frame = 0;
    repeat (8 * cmds.size() + 40) @(negedge eth_clk);   // let the replay finish
  endtask

  initial begin
    logic [31:0] ev [$];
    repeat (4) @(negedge dtc_clk);
    eth_rst = 0; dtc_rst = 0;
    repeat (10) @(negedge dtc_clk);
    // links 0 and 2 get two commands each, link 1 none; the SRU gets a read
    send_frame(41'h000_0000_0005, '{{32'h8000_0060, 32'd0}, {32'h0000_0001, 32'h5}});
    send_frame(41'h100_0000_0000, '{{16'h8000, SRU_CSR_L2_DELAY, 32'd0}});
    repeat (800) @(negedge dtc_clk);
    check(n_rw[0] == 2 && n_rw[1] == 0 && n_rw[2] == 2, $sformatf("node selection %0d %0d %0d", n_rw[0], n_rw[1], n_rw[2]));
    check(n_sru == 1, "SRU CSR reply");
    // reply frame on link 2
    send_words(2, '{{WORD_SYNC, WORD_REPLY}, 32'h8000_0060, 32'h0000_1234}, 0);
    repeat (100) @(negedge dtc_clk);
    check(n_lr == 1, "link reply");
    // CSR trigger: L1 and L2 bits and RDO on every link
    send_frame(41'h100_0000_0000, '{{16'h0000, SRU_CSR_UDP_TRIG, 32'd0}});
    repeat (600) @(negedge dtc_clk);
    for (int k = 0; k < NL; k++)
      check(n_l1[k] == 1 && n_l2[k] == 1 && n_rdo[k] == 1, $sformatf("link %0d trigger %0d %0d %0d", k, n_l1[k], n_l2[k], n_rdo[k]));
    // events on links 0 and 1
    for (int e = 0; e < 3; e++) begin
      ev.delete();
      for (int i = 0; i < 5 + 7 * e; i++) ev.push_back($urandom());
      exp_pkt.delete();
      foreach (ev[i]) for (int b = 0; b < 4; b++) exp_pkt.push_back(ev[i][8*b +: 8]);
      send_words(0, '{{WORD_SYNC, WORD_EVENT}}, 0);
      send_words(0, ev, 0);
      send_words(0, '{EVENT_TRAILER}, 0);
      send_words(1, '{{WORD_SYNC, WORD_EVENT}, 32'h1, EVENT_TRAILER}, 0);
      wait (n_pkt == e + 1);
      repeat (20) @(negedge dtc_clk);
    end
    check(!dut.ram_flags[1], "link 1 event discarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
