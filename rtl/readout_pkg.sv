// readout_pkg: constants and types shared by the SRU and the front-end CPLD.
//
// The DTC link carries two directions:
//  * SRU -> CPLD on the "trig" line, a DDR line modelled here as two bits per
//    40 MHz DTC clock: the trigger half (FeeTrig, rising-edge half) and the
//    command half (serialised command bytes, falling-edge half).  Command bytes
//    go out MSB first, one bit per DTC clock.  A read/write command is the
//    header 0xE1 followed by the 32-bit address word and the 32-bit data word.
//  * CPLD -> SRU on the "data" and "return" lines, both DDR, i.e. four bits
//    per DTC clock.  The CPLD sends 16-bit words, one every four DTC clocks,
//    most significant nibble first.
// Header words 0xE1, 0xBC50, 0xF7F7, 0xDCDC, 0x5C5C and the dummy word
// 0x80128012 follow the design description; the fast-command codes and the
// 0xC5D5C5D5 trailer value are this implementation's choices (see README).
package readout_pkg;

  // ---------------- SRU -> CPLD command bytes ----------------
  localparam logic [7:0] CODE_RW    = 8'hE1;  // slow read/write command header
  localparam logic [7:0] CODE_RDO   = 8'hC3;  // channel readout fast command
  localparam logic [7:0] CODE_ABORT = 8'hA5;  // abort fast command
  localparam logic [7:0] CODE_RESET = 8'h99;  // front-end reset fast command

  // ---------------- CPLD -> SRU 16-bit words ----------------
  localparam logic [15:0] WORD_SYNC     = 16'hBC50;
  localparam logic [15:0] WORD_REPLY    = 16'hF7F7;
  localparam logic [15:0] WORD_STATUS   = 16'hDCDC;
  localparam logic [15:0] WORD_EVENT    = 16'h5C5C;
  localparam logic [15:0] WORD_IDLE     = 16'h0000;
  localparam logic [31:0] EVENT_DUMMY   = 32'h80128012;
  localparam logic [31:0] EVENT_TRAILER = 32'hC5D5C5D5;

  // ---------------- command word layout (Table 1) ----------------
  // address word: [31] WR (1 = read, 0 = write), [30] CType (1 = SALTRO,
  // 0 = CPLD), [29:20] reserved, [19:0] address.
  typedef struct packed {
    logic        rnw;
    logic        ctype;
    logic [9:0]  rsvd;
    logic [19:0] addr;
  } cmd_addr_t;

  // ---------------- SALTRO instruction codes ----------------
  // Low five address bits carry the instruction; bits [8:5] the channel;
  // bit 18 the broadcast flag.
  localparam logic [4:0] SALTRO_RPINC = 5'h19;
  localparam logic [4:0] SALTRO_CHRDO = 5'h1A;
  localparam int         SALTRO_BCAST_BIT = 18;

  // ---------------- SRU CSR map (16-bit addresses) ----------------
  localparam logic [15:0] SRU_CSR_TRIG_MODE   = 16'h0000; // [0] periodic [1] external
  localparam logic [15:0] SRU_CSR_TRIG_PERIOD = 16'h0001; // DTC clocks between periodic triggers
  localparam logic [15:0] SRU_CSR_UDP_TRIG    = 16'h0002; // write: one trigger
  localparam logic [15:0] SRU_CSR_FAST_CMD    = 16'h0003; // write: send fast cmd, code = data[7:0]
  localparam logic [15:0] SRU_CSR_L2_DELAY    = 16'h0004; // DTC clocks from L1 to L2
  localparam logic [15:0] SRU_CSR_CLK_SEL     = 16'h0005; // [0] DcsSrcSel, 1 = external clock
  localparam logic [15:0] SRU_CSR_WORD_ALIGN  = 16'h0006; // write: realign all DTC RX links
  localparam logic [15:0] SRU_CSR_STATUS      = 16'h0007; // read: link 0 and frame status, see sru_top
  localparam logic [15:0] SRU_CSR_TRIG_STATS  = 16'h0008; // read: {abort count, trigger count}
  localparam logic [15:0] SRU_CSR_ERR_STATS   = 16'h0009; // read: {dropped frames, missed triggers}
  localparam logic [15:0] SRU_CSR_ETH_STATS   = 16'h000A; // read: {ICMP echo replies, ARP replies}

  // ---------------- CPLD CSR map (8-bit addresses) ----------------
  localparam logic [7:0] CPLD_CSR_CH_MASK  = 8'h00; // 1 = channel masked (skipped)
  localparam logic [7:0] CPLD_CSR_ADC_DIV  = 8'h01; // [0] 0 = ADCClk RDOClk/2, 1 = RDOClk/4
  localparam logic [7:0] CPLD_CSR_STATUS   = 8'h02; // read: [0] SALTRO error, [1] readout busy
  localparam logic [7:0] CPLD_CSR_SCRATCH  = 8'h60; // general purpose register
  localparam logic [7:0] CPLD_CSR_COUNTERS = 8'h10; // 8 read-only counters, 0x10-0x17

endpackage
