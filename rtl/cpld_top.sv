// cpld_top: front-end board controller (CPLD) between one DTC link and one
// SALTRO ADC chip (Fig. 21 of the design description).
//
// The whole CPLD runs on RDOClk, which is the 40 MHz DTC clock received from
// the SRU.  Blocks and data flow:
//   dtc_trig[1] (trigger half)  -> cpld_trig_decoder  -> trig_l1_n, trig_l2_n
//   dtc_trig[0] (command half)  -> cpld_dtc_rx_decoder -> fast commands to the
//                                  SALTRO controller, read/write commands to
//   cpld_cmd_demux              -> cpld_csr (CType 0) or saltro_controller
//                                  (CType 1); read replies -> cpld_dtc_tx
//   saltro_controller           -> event FIFO -> cpld_dtc_tx
//   cpld_dtc_tx                 -> dtc_data[1:0], dtc_return[1:0]
// A status frame is requested whenever the SALTRO error line changes; the
// status word carries the error flag in bit 0 (the design uses only this
// bit) and the readout-busy flag in bit 1.  The ADC clock PLL is a device
// primitive outside this module; its ratio select comes out as adc_div4.
// The SALTRO bus is split into bd_out/bd_oe/bd_in; the pad tristate is
// outside.
module cpld_top #(
  parameter int unsigned NCH      = 16,
  parameter int unsigned CHRAM_AW = 8,
  parameter int unsigned FIFO_AW  = 10
) (
  input  logic        clk,          // RDOClk (DTC clock)
  input  logic        rst,
  // DTC link
  input  logic [1:0]  dtc_trig,     // [1] trigger half, [0] command half
  output logic [1:0]  dtc_data,
  output logic [1:0]  dtc_return,
  // SALTRO interface
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
  // to the ADC clock PLL
  output logic        adc_div4
);

  // trigger decoder
  logic [15:0] l1_count, l2_count, false_count;
  cpld_trig_decoder u_trig (
    .clk, .rst, .trig_bit(dtc_trig[1]), .trig_l1_n, .trig_l2_n,
    .l1_count, .l2_count, .false_count
  );

  // DTC RX decoder
  logic        rdo_cmd, abort_cmd, reset_cmd;
  logic        dtc_cmd_exec, dtc_cmd_rnw, dtc_cmd_feenal, dtc_cmd_ack;
  logic [19:0] dtc_cmd_addr, dtc_cmd_data;
  cpld_dtc_rx_decoder u_rx (
    .clk, .rst, .cmd_bit(dtc_trig[0]), .rdo_cmd, .abort_cmd, .reset_cmd,
    .dtc_cmd_exec, .dtc_cmd_rnw, .dtc_cmd_feenal, .dtc_cmd_addr, .dtc_cmd_data,
    .dtc_cmd_ack
  );

  // demux and reply packer
  logic        cpld_cmd_exec, cpld_cmd_rnw, cpld_cmd_ack;
  logic [7:0]  cpld_cmd_addr;
  logic [15:0] cpld_cmd_wdata, cpld_cmd_rdata;
  logic        saltro_cmd_exec, saltro_cmd_rw, saltro_cmd_ack;
  logic [19:0] saltro_cmd_addr, saltro_cmd_rx, saltro_cmd_tx;
  logic [31:0] reply_addr, reply_data;
  logic        reply_rdy, frame_state;
  cpld_cmd_demux u_demux (
    .clk, .rst, .dtc_cmd_exec, .dtc_cmd_rnw, .dtc_cmd_feenal, .dtc_cmd_addr,
    .dtc_cmd_data, .dtc_cmd_ack,
    .cpld_cmd_exec, .cpld_cmd_rnw, .cpld_cmd_addr, .cpld_cmd_wdata,
    .cpld_cmd_rdata, .cpld_cmd_ack,
    .saltro_cmd_exec, .saltro_cmd_rw, .saltro_cmd_addr, .saltro_cmd_rx,
    .saltro_cmd_tx, .saltro_cmd_ack,
    .reply_addr, .reply_data, .reply_rdy, .frame_state
  );

  // error line synchroniser and status request
  logic [2:0] err_sync;
  logic       saltro_error, status_req;
  always_ff @(posedge clk) begin
    if (rst) err_sync <= 3'b000;
    else     err_sync <= {err_sync[1:0], !errorn};
  end
  assign saltro_error = err_sync[1];
  assign status_req   = err_sync[1] ^ err_sync[2];

  // CSRs; counters 0x10-0x17: L1, L2, false triggers, SALTRO timeouts,
  // event frames, dummy words, 0, {con_busy, fifo_almost_full} in [1:0]
  logic        fifo_rd_en, fifo_empty, fifo_almost_full;
  logic [31:0] fifo_q;
  logic        event_done, event_done_clr, con_busy;
  logic [15:0] timeouts, event_frames, dummy_words;
  logic [15:0] ch_mask;
  logic        rdo_busy;
  cpld_csr u_csr (
    .clk, .rst, .cpld_cmd_exec, .cpld_cmd_rnw, .cpld_cmd_addr, .cpld_cmd_wdata,
    .cpld_cmd_rdata, .cpld_cmd_ack, .ch_mask, .adc_div4, .saltro_error, .rdo_busy,
    .counters({14'd0, fifo_almost_full, con_busy, 16'd0, dummy_words, event_frames,
               timeouts, false_count, l2_count, l1_count})
  );

  // SALTRO controller
  saltro_controller #(.NCH(NCH), .CHRAM_AW(CHRAM_AW), .FIFO_AW(FIFO_AW)) u_saltro (
    .clk, .rst, .saltro_cmd_exec, .saltro_cmd_rw, .saltro_cmd_addr, .saltro_cmd_rx,
    .saltro_cmd_tx, .saltro_cmd_ack, .rdo_cmd, .abort_cmd, .reset_cmd, .ch_mask,
    .bd_out, .bd_oe, .bd_in, .cstbn, .writen, .ackn, .trsfn, .dstbn,
    .fifo_rd_en, .fifo_q, .fifo_empty, .fifo_almost_full,
    .event_done, .event_done_clr, .rdo_busy, .con_busy, .timeouts
  );

  // DTC TX
  cpld_dtc_tx u_tx (
    .clk, .rst, .reply_rdy, .reply_addr, .reply_data, .frame_state,
    .status_req, .status_bits({14'd0, rdo_busy, saltro_error}),
    .fifo_empty, .fifo_rd_en, .fifo_q, .event_done, .event_done_clr,
    .dtc_data, .dtc_return, .event_frames, .dummy_words
  );

endmodule
