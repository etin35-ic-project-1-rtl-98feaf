// tb_readout_system: end-to-end test of the whole chain at full size (40
// DTC links, 16 SALTRO channels, 1024-word RAMs and FIFOs, no parameter
// overrides on the top).  A behavioural SALTRO chip sits on the CPLD's bus.
//
// The testbench sends Ethernet/IPv4/UDP command frames to the slow-control
// input and plays the readout EMAC on the AXI4-Stream side.  It checks:
//   * SRU CSR writes and reads, with the replies;
//   * CPLD CSR and SALTRO register writes and reads over DTC link 0,
//     with the replies coming back in reply frames;
//   * the same commands leaving on link 5 (serial header decoded here);
//   * triggers from a CSR write, from the external input and the periodic
//     generator: L1 and L2 reach the chip, channels are read out (one masked
//     channel is skipped), and every event arrives as one AXI4-Stream packet
//     whose bytes equal the chip's samples, with tuser = byte count and tlast;
//   * the event FIFO almost-full stall (fast chip) and dummy words on the
//     link (slow chip);
//   * abort of a trigger while link 0's RAM is still full (tready held low);
//   * the word-align command, a fast reset command, a dropped Ethernet frame;
//   * an ARP request and a ping answered on the transmit stream.
// At the end every mechanism must have happened at least once.
module tb_readout_system;
  import readout_pkg::*;
  localparam int NLINKS = 40;

  logic eth_clk = 0, dtc_clk = 0, rst = 1;
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
  logic        tvalid, tready = 1, tlast;
  logic [15:0] tuser;
  logic [NLINKS-1:0] link_reply_valid, err_flags;
  logic [31:0] link_reply_addr [NLINKS], link_reply_data [NLINKS];
  logic        sru_reply_valid, dcs_src_sel;
  logic [31:0] sru_reply_addr, sru_reply_data;
  logic [1:0]  dtc_trig_ext [NLINKS];
  logic [3:0]  dtc_rx_ext [NLINKS];
  logic [39:0] bd_out, bd_in;
  logic [1:0]  bd_oe;
  logic        cstbn, writen, ackn, trsfn, dstbn, errorn, trig_l1_n, trig_l2_n, adc_div4;
  int          xfer_delay = 2, nwords = 27;
  int          l1_seen, l2_seen, chrdo_count, rpinc_count, reg_writes;

  always_comb for (int k = 0; k < NLINKS; k++) dtc_rx_ext[k] = 4'h0;

  readout_system dut (.*);

  saltro_model chip (.clk(dtc_clk), .rst, .bd_out, .bd_oe, .bd_in, .cstbn,
    .writen, .ackn, .trsfn, .dstbn, .errorn, .trig_l1_n, .trig_l2_n, .xfer_delay, .nwords,
    .l1_seen, .l2_seen, .chrdo_count, .rpinc_count, .reg_writes);

  initial begin
    repeat (400000) @(posedge dtc_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] word_of(input int ev, input int ch, input int j);
    return {10'(ev), 10'(ch), 10'(j), 10'(ev * 7 + ch * 3 + j)};
  endfunction

  // ---------------- mechanism counters ----------------
  int m_frames = 0, m_sru_reply = 0, m_link_reply = 0, m_link5_rw = 0, m_link5_rdo = 0;
  int m_packets = 0, m_stall = 0, m_dummy = 0, m_abort = 0, m_reset = 0, m_align = 0;
  int m_status = 0, m_masked = 0, m_ext = 0, m_periodic = 0;

  always @(posedge eth_clk) if (!rst && dut.u_sru.rx_frame_processed) m_frames++;
  always @(posedge dtc_clk) if (!rst) begin
    if (dut.u_cpld.fifo_almost_full && dut.u_cpld.rdo_busy) m_stall++;
    if (dut.u_cpld.abort_cmd) m_abort++;
    if (dut.u_cpld.reset_cmd) m_reset++;
    if (dut.u_sru.word_align) m_align++;
    // status word slot of a status frame (state S_W0 = 10 of cpld_dtc_tx)
    if (dut.u_cpld.u_tx.st == 4'd10 && dut.u_cpld.u_tx.cnt == 2'd3) m_status++;
  end

  // ---------------- replies ----------------
  logic [63:0] sru_exp [$], link_exp [$];
  always @(posedge dtc_clk) begin
    if (sru_reply_valid) begin
      m_sru_reply++;
      check(sru_exp.size() > 0, "unexpected SRU reply");
      if (sru_exp.size() > 0) begin
        check({sru_reply_addr, sru_reply_data} == sru_exp[0],
              $sformatf("SRU reply %h %h exp %h", sru_reply_addr, sru_reply_data, sru_exp[0]));
        void'(sru_exp.pop_front());
      end
    end
    if (link_reply_valid[0]) begin
      m_link_reply++;
      check(link_exp.size() > 0, "unexpected link reply");
      if (link_exp.size() > 0) begin
        check({link_reply_addr[0], link_reply_data[0]} == link_exp[0],
              $sformatf("link reply %h %h exp %h", link_reply_addr[0], link_reply_data[0], link_exp[0]));
        void'(link_exp.pop_front());
      end
    end
    check(link_reply_valid[NLINKS-1:1] == '0, "no replies on unconnected links");
  end

  // ---------------- link 5 command decoder ----------------
  logic [7:0] l5_sh;
  int         l5_nb = 0, l5_skip = 0;
  always @(posedge dtc_clk) if (!rst) begin
    if (l5_skip > 0) l5_skip--;
    else if (l5_nb == 0 && dtc_trig_ext[5][0]) begin l5_sh = 8'd1; l5_nb = 1; end
    else if (l5_nb > 0) begin
      l5_sh = {l5_sh[6:0], dtc_trig_ext[5][0]}; l5_nb++;
      if (l5_nb == 8) begin
        if (l5_sh == CODE_RW) begin m_link5_rw++; l5_skip = 64; end
        if (l5_sh == CODE_RDO) m_link5_rdo++;
        l5_nb = 0;
      end
    end
  end

  // ---------------- readout EMAC model ----------------
  logic [15:0] ch_mask_now = 16'h0000;
  logic [7:0]  pkt [$];
  int          ev_words [$];
  always @(posedge dtc_clk) if (tvalid && tready) begin
    pkt.push_back(tdata);
    if (tlast) begin
      automatic logic [7:0] expb [$];
      automatic int ev = m_packets + 1, nw = 0;
      automatic logic [39:0] w;
      automatic logic [31:0] a, b;
      for (int ch = 0; ch < 16; ch++) if (!ch_mask_now[ch])
        for (int j = 0; j < nwords + ch % 3; j++) begin
          w = word_of(ev, ch, j);
          a = {6'd0, w[39:30], 6'd0, w[29:20]};
          b = {6'd0, w[19:10], 6'd0, w[9:0]};
          for (int i = 0; i < 4; i++) expb.push_back(a[8*i +: 8]);
          for (int i = 0; i < 4; i++) expb.push_back(b[8*i +: 8]);
          nw += 2;
        end
      check(pkt.size() == expb.size(), $sformatf("packet %0d: %0d bytes exp %0d", ev, pkt.size(), expb.size()));
      check(tuser == 16'(expb.size()), $sformatf("packet %0d: tuser %0d", ev, tuser));
      for (int i = 0; i < pkt.size() && i < expb.size(); i++)
        if (pkt[i] != expb[i]) begin
          check(0, $sformatf("packet %0d byte %0d = %h exp %h", ev, i, pkt[i], expb[i]));
          break;
        end
      check(1, "packet compared");
      if (ch_mask_now != 0) m_masked++;
      ev_words.push_back(nw);
      m_packets++;
      pkt.delete();
    end
  end

  // ---------------- Ethernet frames ----------------
  task automatic send_frame(input logic [40:0] nodesel, input logic [63:0] cmds [$], input bit good_mac);
    logic [7:0] f [$];
    int ip_len = 20 + 8 + 8 + 8 * cmds.size();
    f = '{8'h00, 8'h0A, 8'h35, 8'h00, 8'h01, good_mac ? 8'h02 : 8'h07};
    for (int i = 0; i < 6; i++) f.push_back(8'(32 + i));
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'h45); f.push_back(8'h00);
    f.push_back(8'(ip_len >> 8)); f.push_back(8'(ip_len));
    for (int i = 0; i < 5; i++) f.push_back(8'h00);
    f.push_back(8'h11); f.push_back(8'h00); f.push_back(8'h00);
    f.push_back(8'd10); f.push_back(8'd160); f.push_back(8'd1); f.push_back(8'd100);
    f.push_back(8'd10); f.push_back(8'd160); f.push_back(8'd1); f.push_back(8'd2);
    // UDP header: source port, destination port 4660, length, checksum
    f.push_back(8'h30); f.push_back(8'h39); f.push_back(8'h12); f.push_back(8'h34);
    f.push_back(8'((ip_len - 20) >> 8)); f.push_back(8'(ip_len - 20)); f.push_back(8'h00); f.push_back(8'h00);
    // NodeSel words
    f.push_back(8'h00); f.push_back({3'd0, nodesel[40:36]}); f.push_back(nodesel[35:28]); f.push_back(nodesel[27:20]);
    f.push_back(8'h00); f.push_back({4'd0, nodesel[19:16]}); f.push_back(nodesel[15:8]); f.push_back(nodesel[7:0]);
    foreach (cmds[c]) for (int i = 7; i >= 0; i--) f.push_back(cmds[c][8*i +: 8]);
    foreach (f[i]) begin
      @(negedge eth_clk); rx_dv = 1; rx_data = f[i];
    end
    @(negedge eth_clk); rx_dv = 0; rx_good_frame = 1;
    @(negedge eth_clk); rx_good_frame = 0;
  endtask

  task automatic send_raw(input logic [7:0] f [$]);
    foreach (f[i]) begin
      @(negedge eth_clk); rx_dv = 1; rx_data = f[i];
    end
    @(negedge eth_clk); rx_dv = 0; rx_good_frame = 1;
    @(negedge eth_clk); rx_good_frame = 0;
    repeat (20) @(negedge eth_clk);
  endtask

  // ARP and echo replies on the slow-control transmit stream
  int m_arp = 0, m_ping = 0;
  logic [7:0] txf [$];
  always @(posedge eth_clk) begin
    if (rst) txf = {};
    else if (eth_tx_valid && eth_tx_ready) begin
      txf.push_back(eth_tx_data);
      if (eth_tx_last) begin
        if (txf.size() == 60 && txf[13] == 8'h06 && txf[21] == 8'h02 && txf[41] == 8'd100) m_arp++;
        // echo reply: type 0, checksum 0x5430
        if (txf.size() == 44 && txf[23] == 8'h01 && txf[34] == 8'h00 && txf[36] == 8'h54 &&
            txf[37] == 8'h30 && txf[33] == 8'd100) m_ping++;
        txf = {};
      end
    end
  end

  // node 40 = SRU CSRs; address word {rnw, 15'b0, register}
  function automatic logic [63:0] sru_wr(input logic [15:0] a, input logic [31:0] d);
    return {16'h0000, a, d};
  endfunction
  function automatic logic [63:0] sru_rd(input logic [15:0] a);
    return {16'h8000, a, 32'd0};
  endfunction
  // links: address word {rnw, ctype, 10'b0, addr[19:0]}
  function automatic logic [63:0] fee_cmd(input logic rnw, input logic ctype, input logic [19:0] a,
                                           input logic [31:0] d);
    return {rnw, ctype, 10'd0, a, d};
  endfunction

  task automatic wait_dtc(input int n);
    repeat (n) @(negedge dtc_clk);
  endtask
  task automatic wait_packets(input int n);
    int t = 0;
    while (m_packets < n && t < 60000) begin @(negedge dtc_clk); t++; end
    check(m_packets >= n, $sformatf("%0d packets received", n));
  endtask

  logic [63:0] cmds [$];
  initial begin
    int l10, l20, ch0, ab0;
    repeat (10) @(negedge dtc_clk);
    rst = 0;
    repeat (20) @(negedge dtc_clk);

    // --- SRU CSRs: L2 delay, word align, read back
    cmds = '{sru_wr(SRU_CSR_L2_DELAY, 32'd40), sru_wr(SRU_CSR_WORD_ALIGN, 0),
             sru_rd(SRU_CSR_L2_DELAY), sru_rd(SRU_CSR_TRIG_PERIOD)};
    sru_exp.push_back({32'h8000_0000 | 32'(SRU_CSR_L2_DELAY), 32'd40});
    sru_exp.push_back({32'h8000_0000 | 32'(SRU_CSR_TRIG_PERIOD), 32'd40000});
    send_frame(41'h100_0000_0000, cmds, 1);
    wait_dtc(1200);
    check(sru_exp.size() == 0, "SRU replies received");

    // --- link 0 and link 5: CPLD CSR and SALTRO register access
    cmds = '{fee_cmd(0, 0, 20'(CPLD_CSR_CH_MASK), 32'h0004),
             fee_cmd(1, 0, 20'(CPLD_CSR_CH_MASK), 0),
             fee_cmd(0, 1, 20'h00005, 32'h12345),
             fee_cmd(1, 1, 20'h00005, 0),
             fee_cmd(1, 0, 20'(CPLD_CSR_SCRATCH), 0)};
    link_exp.push_back({32'h8000_0000 | 32'(CPLD_CSR_CH_MASK), 32'h0004});
    link_exp.push_back({32'hC000_0005, 32'h0001_2345});
    link_exp.push_back({32'h8000_0000 | 32'(CPLD_CSR_SCRATCH), 32'h0000});
    send_frame(41'h000_0000_0021, cmds, 1);
    wait_dtc(2000);
    check(link_exp.size() == 0, "link 0 replies received");
    check(m_link5_rw == 5, $sformatf("link 5 saw %0d commands", m_link5_rw));
    check(reg_writes == 1, "SALTRO register written");
    ch_mask_now = 16'h0004;

    // --- event 1: CSR trigger, fast chip -> almost-full stall
    l10 = l1_seen; l20 = l2_seen; ch0 = chrdo_count;
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_UDP_TRIG, 0)}, 1);
    wait_packets(1);
    check(l1_seen == l10 + 1 && l2_seen == l20 + 1, "L1 and L2 reached the chip");
    check(chrdo_count == ch0 + 15, "15 channels read, one masked");
    check(rpinc_count == 1, "RPINC after the readout");
    check(m_stall > 0, "FIFO almost-full stall");

    // --- event 2 held in link 0's RAM, event 3 aborted
    tready = 0;
    ab0 = m_abort;
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_UDP_TRIG, 0)}, 1);
    wait (dut.u_sru.ram_flags[0]);
    wait_dtc(100);
    l20 = l2_seen;
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_UDP_TRIG, 0)}, 1);
    wait_dtc(1000);
    check(m_abort == ab0 + 1, "abort sent to the CPLD");
    check(l2_seen == l20, "no L2 for the aborted trigger");
    tready = 1;
    wait_packets(2);

    // --- event 3: external trigger, slow chip -> dummy words
    xfer_delay = 200; nwords = 4;
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_TRIG_MODE, 32'd2)}, 1);
    wait_dtc(600);
    ext_trig = 1; wait_dtc(10); ext_trig = 0;
    m_ext++;
    wait_packets(3);
    m_dummy = int'(dut.u_cpld.dummy_words);
    check(m_dummy > 0, "dummy words sent");
    xfer_delay = 2; nwords = 27;

    // --- event 4: periodic trigger, then stop it
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_TRIG_PERIOD, 32'd20000),
                                   sru_wr(SRU_CSR_TRIG_MODE, 32'd1)}, 1);
    wait_packets(4);
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_TRIG_MODE, 32'd0)}, 1);
    m_periodic = m_packets - 3;
    wait_dtc(12000);
    check(!tvalid && !dut.u_sru.ram_flags[0], "quiet after stopping the trigger");

    // --- fast reset command, dropped frame, statistics read-back
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_FAST_CMD, 32'(CODE_RESET))}, 1);
    wait_dtc(100);
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_UDP_TRIG, 0)}, 0);   // wrong MAC
    wait_dtc(800);
    check(m_reset == 1, $sformatf("fast reset reached the CPLD (frames %0d)", m_frames));
    sru_exp.push_back({32'h8000_0000 | 32'(SRU_CSR_ERR_STATS), {16'd1, 16'(dut.u_sru.missed)}});
    sru_exp.push_back({32'h8000_0000 | 32'(SRU_CSR_TRIG_STATS), {16'd1, 16'(dut.u_sru.trig_count)}});
    send_frame(41'h100_0000_0000, '{sru_rd(SRU_CSR_ERR_STATS), sru_rd(SRU_CSR_TRIG_STATS)}, 1);
    wait_dtc(1200);
    check(sru_exp.size() == 0, "statistics read back");

    // --- ARP request and ping to the SRU
    send_raw('{8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h64,
               8'h08, 8'h06, 8'h00, 8'h01, 8'h08, 8'h00, 8'h06, 8'h04, 8'h00, 8'h01,
               8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h64, 8'd10, 8'd160, 8'd1, 8'd100,
               8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'd10, 8'd160, 8'd1, 8'd2,
               8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
               8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    // echo request: IP header checksum 0x2480 is not checked by the SRU;
    // ICMP checksum of type 8, id 1, seq 1, payload 0xABCD is 0x4C30
    send_raw('{8'h00, 8'h0A, 8'h35, 8'h00, 8'h01, 8'h02, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h64,
               8'h08, 8'h00, 8'h45, 8'h00, 8'h00, 8'h1E, 8'h00, 8'h00, 8'h00, 8'h00,
               8'h40, 8'h01, 8'h00, 8'h00, 8'd10, 8'd160, 8'd1, 8'd100, 8'd10, 8'd160, 8'd1, 8'd2,
               8'h08, 8'h00, 8'h4C, 8'h30, 8'h00, 8'h01, 8'h00, 8'h01, 8'hAB, 8'hCD,
               8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
               8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    repeat (400) @(negedge eth_clk);

    // --- every mechanism happened at least once
    $display("frames=%0d sru_replies=%0d link_replies=%0d link5_rw=%0d link5_rdo=%0d packets=%0d",
             m_frames, m_sru_reply, m_link_reply, m_link5_rw, m_link5_rdo, m_packets);
    $display("stall=%0d dummy=%0d abort=%0d reset=%0d align=%0d status=%0d masked=%0d ext=%0d periodic=%0d",
             m_stall, m_dummy, m_abort, m_reset, m_align, m_status, m_masked, m_ext, m_periodic);
    check(m_frames >= 1,      "mechanism: UDP command frame processed");
    check(m_sru_reply >= 1,   "mechanism: SRU CSR read reply");
    check(m_link_reply >= 1,  "mechanism: front-end read reply");
    check(m_link5_rw >= 1,    "mechanism: command on another link");
    check(m_link5_rdo >= 1,   "mechanism: readout command on every link");
    check(m_packets >= 4,     "mechanism: events streamed");
    check(m_stall >= 1,       "mechanism: event FIFO almost-full stall");
    check(m_dummy >= 1,       "mechanism: dummy words");
    check(m_abort >= 1,       "mechanism: abort");
    check(m_reset >= 1,       "mechanism: fast reset command");
    check(m_align >= 1,       "mechanism: word align");
    check(m_status >= 1,      "mechanism: status frame");
    check(m_masked >= 1,      "mechanism: masked channel");
    check(m_ext >= 1,         "mechanism: external trigger");
    check(m_periodic >= 1,    "mechanism: periodic trigger");
    $display("arp=%0d ping=%0d", m_arp, m_ping);
    check(m_arp == 1,         "mechanism: ARP reply");
    check(m_ping == 1,        "mechanism: ICMP echo reply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
