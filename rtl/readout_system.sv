// readout_system: a complete readout chain, the SRU and one front-end CPLD
// joined by DTC link 0 (the prototype set-up of the design description:
// one SALTRO ADC behind one CPLD, read out by the SRU over UDP).
//
// Both chips run on the 40 MHz DTC clock: the SRU drives it onto the DTC
// clock lane and the CPLD uses it as RDOClk.  The cable between them is a
// plain wire here.  The remaining 39 SRU links come out as ports
// (dtc_trig_ext / dtc_rx_ext, index 1..NLINKS-1), together with the
// Ethernet receive stream of the slow-control MAC, the AXI4-Stream towards
// the readout EMAC, control replies, the SALTRO bus and the ADC clock select.
module readout_system #(
  parameter int unsigned NLINKS = 40
) (
  input  logic        eth_clk,
  input  logic        dtc_clk,
  input  logic        rst,
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
  input  logic        ext_trig,
  // readout AXI4-Stream
  output logic [7:0]  tdata,
  output logic        tvalid,
  input  logic        tready,
  output logic        tlast,
  output logic [15:0] tuser,
  // control replies
  output logic [NLINKS-1:0] link_reply_valid,
  output logic [31:0] link_reply_addr [NLINKS],
  output logic [31:0] link_reply_data [NLINKS],
  output logic        sru_reply_valid,
  output logic [31:0] sru_reply_addr,
  output logic [31:0] sru_reply_data,
  output logic [NLINKS-1:0] err_flags,
  output logic        dcs_src_sel,
  // SRU links 1..NLINKS-1 (index 0 unused)
  output logic [1:0]  dtc_trig_ext [NLINKS],
  input  logic [3:0]  dtc_rx_ext   [NLINKS],
  // SALTRO interface of the CPLD on link 0
  output logic [39:0] bd_out,
  output logic [1:0]  bd_oe,
  input  logic [39:0] bd_in,
  output logic        cstbn,
  output logic        writen,
  input  logic        ackn,
  input  logic        trsfn,
  input  logic        dstbn,
  input  logic        errorn,
  output logic        trig_l1_n,
  output logic        trig_l2_n,
  output logic        adc_div4
);

  logic [1:0] dtc_trig [NLINKS];
  logic [3:0] dtc_rx   [NLINKS];
  logic [1:0] cpld_data, cpld_return;

  // reset synchronisers, one per clock domain
  logic [1:0] eth_rst_s, dtc_rst_s;
  always_ff @(posedge eth_clk) eth_rst_s <= {eth_rst_s[0], rst};
  always_ff @(posedge dtc_clk) dtc_rst_s <= {dtc_rst_s[0], rst};

  sru_top #(.NLINKS(NLINKS)) u_sru (
    .eth_clk, .eth_rst(eth_rst_s[1]), .dtc_clk, .dtc_rst(dtc_rst_s[1]),
    .rx_data, .rx_dv, .rx_good_frame, .rx_bad_frame,
    .eth_tx_data, .eth_tx_valid, .eth_tx_last, .eth_tx_ready,
    .dtc_trig, .dtc_rx, .ext_trig,
    .tdata, .tvalid, .tready, .tlast, .tuser,
    .link_reply_valid, .link_reply_addr, .link_reply_data,
    .sru_reply_valid, .sru_reply_addr, .sru_reply_data, .err_flags, .dcs_src_sel
  );

  cpld_top u_cpld (
    .clk(dtc_clk), .rst(dtc_rst_s[1]), .dtc_trig(dtc_trig[0]),
    .dtc_data(cpld_data), .dtc_return(cpld_return),
    .bd_out, .bd_oe, .bd_in, .cstbn, .writen, .ackn, .trsfn, .dstbn, .errorn,
    .trig_l1_n, .trig_l2_n, .adc_div4
  );

  always_comb begin
    for (int k = 0; k < NLINKS; k++) begin
      dtc_trig_ext[k] = (k == 0) ? 2'b00 : dtc_trig[k];
      dtc_rx[k]       = (k == 0) ? {cpld_data, cpld_return} : dtc_rx_ext[k];
    end
  end

endmodule
