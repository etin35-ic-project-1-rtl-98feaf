// tb_workloads: the event sizes the design is meant to read out, run
// through the whole chain at full size (readout_system with no parameter
// overrides, behavioural SALTRO on the CPLD bus).
//
// Each workload sets the CPLD channel mask and the number of samples per
// channel in the SALTRO model, fires one trigger with an SRU CSR write and
// collects the AXI4-Stream packet:
//   2 channels x 1024 samples  (1024 RAM words: fits exactly)
//   1 channel  x  976 samples  (two events, 488 words each)
//   3 channels x 1024 samples  (1536 words: cut to the 1024-word RAM)
//   16 channels x 148..156 samples (1214 words: cut to the 1024-word RAM)
// The samples are packed two per 32-bit word, so an event of n samples needs
// n/2 RAM words.  Events that fit must arrive complete and equal to the
// chip's data; events that do not fit must arrive as their first 1024 words
// with the link's RAM overflow flag set.
module tb_workloads;
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
  int          xfer_delay = 2, nwords = 256;
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

  // ---------------- readout EMAC model ----------------
  logic [15:0] ch_mask_now = 16'h0000;
  logic [7:0]  pkt [$];
  int          n_packets = 0, last_bytes = 0, exp_bytes = 0;
  always @(posedge dtc_clk) if (!rst && tvalid && tready) begin
    pkt.push_back(tdata);
    if (tlast) begin
      automatic logic [7:0] expb [$];
      automatic logic [39:0] w;
      automatic logic [31:0] a, b;
      for (int ch = 0; ch < 16; ch++) if (!ch_mask_now[ch])
        for (int j = 0; j < nwords + ch % 3; j++) begin
          w = word_of(l2_seen, ch, j);
          a = {6'd0, w[39:30], 6'd0, w[29:20]};
          b = {6'd0, w[19:10], 6'd0, w[9:0]};
          for (int i = 0; i < 4; i++) expb.push_back(a[8*i +: 8]);
          for (int i = 0; i < 4; i++) expb.push_back(b[8*i +: 8]);
        end
      exp_bytes  = expb.size();
      last_bytes = pkt.size();
      check(tuser == 16'(pkt.size()), $sformatf("tuser %0d for %0d bytes", tuser, pkt.size()));
      for (int i = 0; i < pkt.size() && i < expb.size(); i++)
        if (pkt[i] != expb[i]) begin
          check(0, $sformatf("byte %0d = %h exp %h", i, pkt[i], expb[i]));
          break;
        end
      n_packets++;
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

  function automatic logic [63:0] sru_wr(input logic [15:0] a, input logic [31:0] d);
    return {16'h0000, a, d};
  endfunction
  function automatic logic [63:0] fee_wr(input logic [19:0] a, input logic [31:0] d);
    return {1'b0, 1'b0, 10'd0, a, d};
  endfunction

  task automatic run(input string name, input logic [15:0] mask, input int nw, input bit fits);
    int n0 = n_packets, t = 0, samples = 0;
    for (int ch = 0; ch < 16; ch++) if (!mask[ch]) samples += 4 * (nw + ch % 3);
    send_frame(41'h000_0000_0001, '{fee_wr(20'(CPLD_CSR_CH_MASK), 32'(mask))}, 1);
    repeat (600) @(negedge dtc_clk);
    ch_mask_now = mask; nwords = nw;
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_UDP_TRIG, 0)}, 1);
    while (n_packets == n0 && t < 100000) begin @(negedge dtc_clk); t++; end
    check(n_packets == n0 + 1, {name, ": one packet"});
    // let the rest of an oversized event drain from the link
    repeat (12000) @(negedge dtc_clk);
    if (fits) check(last_bytes == exp_bytes, $sformatf("%s: %0d bytes, expected %0d", name, last_bytes, exp_bytes));
    else begin
      check(exp_bytes > 4096 && last_bytes == 4096,
            $sformatf("%s: %0d bytes of %0d, expected the first 4096", name, last_bytes, exp_bytes));
      check(dut.u_sru.link_ram_ovf[0], {name, ": RAM overflow flagged"});
    end
    $display("%s: %0d samples, %0d bytes needed, %0d bytes read out, %0d clocks",
             name, samples, exp_bytes, last_bytes, t);
  endtask

  initial begin
    repeat (10) @(negedge dtc_clk);
    rst = 0;
    repeat (20) @(negedge dtc_clk);
    send_frame(41'h100_0000_0000, '{sru_wr(SRU_CSR_L2_DELAY, 32'd40)}, 1);
    repeat (600) @(negedge dtc_clk);
    // channels 0 and 3 (ch % 3 == 0) have exactly nw 40-bit words
    run("2 channels x 1024 samples", 16'hFFF6, 256, 1);
    check(!dut.u_sru.link_ram_ovf[0], "no overflow for an event that fits");
    run("1 channel x 976 samples, event 1", 16'hFFFE, 244, 1);
    run("1 channel x 976 samples, event 2", 16'hFFFE, 244, 1);
    run("3 channels x 1024 samples", 16'hFFB6, 256, 0);
    run("16 channels x 148..156 samples", 16'h0000, 37, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
