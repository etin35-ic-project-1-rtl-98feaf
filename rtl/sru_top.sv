// sru_top: Serial Readout Unit (Fig. 2 of the design description).
//
// Converts UDP command packets into DTC commands for up to 40 front-end
// boards and turns the event data coming back over DTC link 0 into an
// AXI4-Stream for the readout UDP EMAC.
//   Ethernet clock (125 MHz): udp_rx_decoder -> udp_cmd_dist, which gives the
//     command bytes to 41 nodes: a dcs_cmd_decoder per DTC link
//     (NodeSel[39:0]) and one for the SRU CSRs (NodeSel[40]); in parallel
//     arp_icmp_reply answers ARP requests and pings on the transmit stream.
//   DTC clock (40 MHz): per link a dcs_cmd_decoder read side, sru_dtc_tx and
//     sru_dtc_rx; sru_csr; trigger_gen; readout_fsm on link 0.
// The trigger generator's FeeTrig stream, readout and abort commands go to
// every link, as does a CSR fast command and the word-align command.  The
// trigger generator treats link 0's full readout RAM as busy.  As in the
// design, only link 0 is read out; the RAMs of the other links are released
// as soon as they fill (their events are discarded).  Read replies from the
// links and from the SRU CSRs, which the design returns through the
// slow-control EMAC, come out as ports, as do the clock-mux select and the
// AXI4-Stream to the readout EMAC.  The Ethernet MAC, the readout EMAC and
// the clock generation are device or third-party IP outside this module.
// SRU status register (read at SRU_CSR_STATUS):
//   [0] link 0 RamFlag  [1] link 0 ErrFlag  [2] SRU command FIFO overflow
//   [3] any link command FIFO overflow  [4] all links aligned
//   [5] any link RAM overflow  [6] UDP frame being processed
//   [7] any link TX busy  [15:8] link 0 dropped events
//   [31:16] UDP command frames processed
// The dropped-event counters of links 1..NLINKS-1 are left unread (lint
// reports them as unused): those links discard their events anyway.
// ETH_STATS holds {ICMP echo replies, ARP replies}; the count of echo
// requests dropped while a reply was pending is left unread (lint reports it).
// TRIG_STATS holds {abort count, trigger count}, ERR_STATS {dropped Ethernet
// frames, missed triggers}.  The frame counters and bit 6 come from the
// Ethernet clock domain (as do the ETH_STATS counters) and are read without
// synchronisation: they are slowly changing status values, so a read during
// a change may be off by one count (this implementation's choice, to keep the status path small).
module sru_top #(
  parameter int unsigned NLINKS   = 40,
  parameter int unsigned RAM_AW   = 10,
  parameter int unsigned CMD_AW   = 10,
  parameter logic [15:0] CMD_PORT = 16'd4660
) (
  input  logic        eth_clk,
  input  logic        eth_rst,
  input  logic        dtc_clk,
  input  logic        dtc_rst,
  // slow-control Ethernet MAC receive stream
  input  logic [7:0]  rx_data,
  input  logic        rx_dv,
  input  logic        rx_good_frame,
  input  logic        rx_bad_frame,
  // slow-control Ethernet MAC transmit stream (ARP and ICMP echo replies)
  output logic [7:0]  eth_tx_data,
  output logic        eth_tx_valid,
  output logic        eth_tx_last,
  input  logic        eth_tx_ready,
  // DTC links
  output logic [1:0]  dtc_trig [NLINKS],
  input  logic [3:0]  dtc_rx   [NLINKS],
  input  logic        ext_trig,
  // readout AXI4-Stream
  output logic [7:0]  tdata,
  output logic        tvalid,
  input  logic        tready,
  output logic        tlast,
  output logic [15:0] tuser,
  // control replies and status
  output logic [NLINKS-1:0] link_reply_valid,
  output logic [31:0] link_reply_addr [NLINKS],
  output logic [31:0] link_reply_data [NLINKS],
  output logic        sru_reply_valid,
  output logic [31:0] sru_reply_addr,
  output logic [31:0] sru_reply_data,
  output logic [NLINKS-1:0] err_flags,
  output logic        dcs_src_sel
);

  // ---------------- Ethernet clock domain ----------------
  logic        udp_frame, rx_frame_processed;
  logic [7:0]  udp_rxd, dcs_rxd;
  logic        udp_rx_dv;
  logic [15:0] frames_dropped;
  logic [40:0] dcs_rx_dv;

  udp_rx_decoder u_udp_rx (
    .clk(eth_clk), .rst(eth_rst), .rx_data, .rx_dv, .rx_good_frame, .rx_bad_frame,
    .udp_frame, .udp_rxd, .udp_rx_dv, .rx_frame_processed, .frames_dropped
  );

  // ARP and ping replies; the reply counters are readable in ETH_STATS
  logic [15:0] arp_replies, icmp_replies, echo_dropped;
  arp_icmp_reply u_reply (
    .clk(eth_clk), .rst(eth_rst), .rx_data, .rx_dv, .rx_good_frame, .rx_bad_frame,
    .tx_data(eth_tx_data), .tx_valid(eth_tx_valid), .tx_last(eth_tx_last),
    .tx_ready(eth_tx_ready), .arp_replies, .icmp_replies, .dropped(echo_dropped)
  );

  udp_cmd_dist #(.CMD_PORT(CMD_PORT)) u_dist (
    .clk(eth_clk), .rst(eth_rst), .udp_rxd, .udp_rx_dv, .dcs_rxd, .dcs_rx_dv
  );

  // ---------------- trigger generation signals ----------------
  logic        fee_trig, rdo_cmd, abort_cmd;
  logic [15:0] trig_count, abort_count, missed;

  // ---------------- SRU CSRs (node 40) ----------------
  logic [31:0] csr_addr, csr_data;
  logic        csr_dv, csr_ack, csr_fifo_ovf;
  logic [1:0]  trig_mode;
  logic [31:0] trig_period;
  logic [15:0] l2_delay;
  logic        udp_trig, fast_cmd, word_align;
  logic [7:0]  fast_cmd_code;
  logic [NLINKS-1:0] ram_flags, link_fifo_ovf, link_tx_busy, link_ram_ovf, link_aligned;
  logic [7:0]        dropped0;
  logic [15:0]       frames_ok;            // UDP frames replayed to the distributor

  always_ff @(posedge eth_clk) begin
    if (eth_rst)                 frames_ok <= '0;
    else if (rx_frame_processed) frames_ok <= frames_ok + 16'd1;
  end

  dcs_cmd_decoder #(.AW(CMD_AW)) u_sru_cmd (
    .eth_clk, .eth_rst, .dcs_rxd, .dcs_rx_dv(dcs_rx_dv[40]),
    .dtc_clk, .dtc_rst, .udp_cmd_addr(csr_addr), .udp_cmd_data(csr_data),
    .udp_cmd_dv(csr_dv), .udp_cmd_ack(csr_ack), .fifo_overflow(csr_fifo_ovf)
  );

  sru_csr u_csr (
    .clk(dtc_clk), .rst(dtc_rst), .cmd_addr(csr_addr), .cmd_data(csr_data),
    .cmd_dv(csr_dv), .cmd_ack(csr_ack), .trig_mode, .trig_period, .l2_delay,
    .dcs_src_sel, .udp_trig, .fast_cmd, .fast_cmd_code, .word_align,
    .status({frames_ok, dropped0, |link_tx_busy, udp_frame, |link_ram_ovf, &link_aligned,
             |link_fifo_ovf, csr_fifo_ovf, err_flags[0], ram_flags[0]}),
    .trig_stats({abort_count, trig_count}), .err_stats({frames_dropped, missed}),
    .eth_stats({icmp_replies, arp_replies}),
    .reply_valid(sru_reply_valid), .reply_addr(sru_reply_addr),
    .reply_data(sru_reply_data)
  );

  // ---------------- trigger generation ----------------
  trigger_gen u_trig (
    .clk(dtc_clk), .rst(dtc_rst), .trig_mode, .trig_period, .l2_delay,
    .udp_trig, .ext_trig, .busy(ram_flags[0]), .fee_trig, .rdo_cmd, .abort_cmd,
    .trig_count, .abort_count, .missed
  );

  // ---------------- DTC links ----------------
  logic [RAM_AW-1:0] ram_rd_addr [NLINKS];
  logic [31:0]       ram_rd_data [NLINKS];
  logic [RAM_AW:0]   word_count  [NLINKS];
  logic [NLINKS-1:0] rd_confirm;

  for (genvar k = 0; k < NLINKS; k++) begin : g_link
    logic [31:0] cmd_addr, cmd_data;
    logic        cmd_dv, cmd_ack, fifo_ovf, tx_busy, aligned, ram_ovf;
    logic [7:0]  dropped;

    dcs_cmd_decoder #(.AW(CMD_AW)) u_dcs (
      .eth_clk, .eth_rst, .dcs_rxd, .dcs_rx_dv(dcs_rx_dv[k]),
      .dtc_clk, .dtc_rst, .udp_cmd_addr(cmd_addr), .udp_cmd_data(cmd_data),
      .udp_cmd_dv(cmd_dv), .udp_cmd_ack(cmd_ack), .fifo_overflow(fifo_ovf)
    );

    sru_dtc_tx u_tx (
      .clk(dtc_clk), .rst(dtc_rst), .udp_cmd_addr(cmd_addr), .udp_cmd_data(cmd_data),
      .udp_cmd_dv(cmd_dv), .udp_cmd_ack(cmd_ack), .rdo_cmd, .abort_cmd, .fast_cmd,
      .fast_cmd_code, .fee_trig, .dtc_trig(dtc_trig[k]), .busy(tx_busy)
    );

    sru_dtc_rx #(.RAM_AW(RAM_AW)) u_rx (
      .clk(dtc_clk), .rst(dtc_rst), .dtc_rx(dtc_rx[k]), .word_align, .aligned,
      .ram_rd_addr(ram_rd_addr[k]), .ram_rd_data(ram_rd_data[k]),
      .ram_flag(ram_flags[k]), .word_count(word_count[k]), .rd_confirm(rd_confirm[k]),
      .err_flag(err_flags[k]), .reply_valid(link_reply_valid[k]),
      .reply_addr(link_reply_addr[k]), .reply_data(link_reply_data[k]),
      .ram_overflow(ram_ovf), .dropped_events(dropped)
    );

    assign link_fifo_ovf[k] = fifo_ovf;
    assign link_tx_busy[k]  = tx_busy;
    assign link_ram_ovf[k]  = ram_ovf;
    assign link_aligned[k]  = aligned;
    if (k == 0) begin : g_status
      assign dropped0 = dropped;
    end
    if (k != 0) begin : g_discard
      assign ram_rd_addr[k] = '0;
      assign rd_confirm[k]  = ram_flags[k];
    end
  end

  // ---------------- readout of link 0 ----------------
  readout_fsm #(.RAM_AW(RAM_AW)) u_rdo (
    .clk(dtc_clk), .rst(dtc_rst), .ram_flag(ram_flags[0]), .word_count(word_count[0]),
    .ram_rd_addr(ram_rd_addr[0]), .ram_rd_data(ram_rd_data[0]), .rd_confirm(rd_confirm[0]),
    .tdata, .tvalid, .tready, .tlast, .tuser
  );

endmodule
