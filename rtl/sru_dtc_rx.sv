// sru_dtc_rx: DTC receiver of one link in the SRU: input deserializer, RX
// decoder, RAM management and readout RAM (Fig. 16 of the design description).
//
// Input: dtc_rx[3:0], the four bits the CPLD sends per DTC clock on its two
// DDR lines (data and return).  The deserializer keeps a 16-bit window of
// the last four nibbles.  In ALIGN the decoder waits for the window to hold
// the sync word 0xBC50; that fixes the word boundary, and from then on a
// 16-bit word (dtc_rx_deser) is taken every fourth clock.  A word_align pulse
// (from a CSR) restarts the alignment.
// Decoder states after alignment:
//   WAIT      look for a frame header: 0xF7F7 reply, 0xDCDC status,
//             0x5C5C event (0xBC50 and idle words are skipped)
//   STATUS    two words; the LSB of the second is the SALTRO error flag
//   REPLY     four words: address (2) and data (2) of a CSR read reply,
//             given out as one reply_valid pulse
//   EVENT     every two words one 32-bit word goes into the readout RAM,
//             until the trailer 0xC5D5C5D5 ends the event; the dummy word
//             0x80128012 the CPLD sends while it has no data is not stored
// RAM management: the end of an event (WrConfirm) raises ram_flag and
// freezes word_count; ram_flag stays high until the readout FSM pulses
// rd_confirm after reading the last word.  An event arriving while ram_flag
// is high is dropped (dropped_events counts it), and words beyond the RAM
// depth are dropped and flagged in ram_overflow: both are this
// implementation's choices.  The RAM read port has one clock of latency.
module sru_dtc_rx
  import readout_pkg::*;
#(
  parameter int unsigned RAM_AW = 10      // readout RAM: 1024 x 32 bit
) (
  input  logic              clk,          // 40 MHz DTC clock
  input  logic              rst,
  input  logic [3:0]        dtc_rx,
  input  logic              word_align,
  output logic              aligned,
  // readout RAM read side
  input  logic [RAM_AW-1:0] ram_rd_addr,
  output logic [31:0]       ram_rd_data,
  output logic              ram_flag,
  output logic [RAM_AW:0]   word_count,
  input  logic              rd_confirm,
  // status and replies
  output logic              err_flag,
  output logic              reply_valid,
  output logic [31:0]       reply_addr,
  output logic [31:0]       reply_data,
  output logic              ram_overflow,
  output logic [7:0]        dropped_events
);

  // ---------------- deserializer ----------------
  logic [15:0] dtc_rx_deser;
  logic [1:0]  wcnt;
  logic        strobe;

  assign strobe = aligned && (wcnt == 2'd0);

  typedef enum logic [3:0] {
    ALIGN, WAIT, STATUS0, STATUS1, REPLY0, REPLY1, REPLY2, REPLY3, EVENT_HI, EVENT_LO
  } st_t;
  st_t st;

  logic [31:0]       mem [2**RAM_AW];
  logic [RAM_AW:0]   wr_addr;
  logic [15:0]       hi_word;
  logic              drop;
  logic [31:0]       ev_word;

  assign ev_word = {hi_word, dtc_rx_deser};
  assign aligned = (st != ALIGN);

  always_ff @(posedge clk) begin
    if (rst) begin
      dtc_rx_deser   <= '0;
      wcnt           <= '0;
      st             <= ALIGN;
      wr_addr        <= '0;
      hi_word        <= '0;
      drop           <= 1'b0;
      ram_flag       <= 1'b0;
      word_count     <= '0;
      err_flag       <= 1'b0;
      reply_valid    <= 1'b0;
      reply_addr     <= '0;
      reply_data     <= '0;
      ram_overflow   <= 1'b0;
      dropped_events <= '0;
    end else begin
      dtc_rx_deser <= {dtc_rx_deser[11:0], dtc_rx};
      wcnt         <= wcnt + 2'd1;
      reply_valid  <= 1'b0;
      if (rd_confirm) ram_flag <= 1'b0;

      if (word_align) begin
        st <= ALIGN;
      end else if (st == ALIGN) begin
        if (dtc_rx_deser == WORD_SYNC) begin
          st   <= WAIT;
          wcnt <= 2'd1;
        end
      end else if (strobe) begin
        case (st)
          WAIT: begin
            if (dtc_rx_deser == WORD_REPLY)  st <= REPLY0;
            if (dtc_rx_deser == WORD_STATUS) st <= STATUS0;
            if (dtc_rx_deser == WORD_EVENT) begin
              st      <= EVENT_HI;
              wr_addr <= '0;
              drop    <= ram_flag;
              if (ram_flag) dropped_events <= dropped_events + 8'd1;
            end
          end
          STATUS0: st <= STATUS1;
          STATUS1: begin
            err_flag <= dtc_rx_deser[0];
            st       <= WAIT;
          end
          REPLY0: begin reply_addr[31:16] <= dtc_rx_deser; st <= REPLY1; end
          REPLY1: begin reply_addr[15:0]  <= dtc_rx_deser; st <= REPLY2; end
          REPLY2: begin reply_data[31:16] <= dtc_rx_deser; st <= REPLY3; end
          REPLY3: begin
            reply_data[15:0] <= dtc_rx_deser;
            reply_valid      <= 1'b1;
            st               <= WAIT;
          end
          EVENT_HI: begin
            hi_word <= dtc_rx_deser;
            st      <= EVENT_LO;
          end
          EVENT_LO: begin
            st <= EVENT_HI;
            if (ev_word == EVENT_TRAILER) begin
              st <= WAIT;
              if (!drop) begin            // WrConfirm
                ram_flag   <= 1'b1;
                word_count <= wr_addr;
              end
            end else if (ev_word != EVENT_DUMMY && !drop) begin
              if (wr_addr[RAM_AW]) ram_overflow <= 1'b1;
              else begin
                mem[wr_addr[RAM_AW-1:0]] <= ev_word;
                wr_addr <= wr_addr + 1'b1;
              end
            end
          end
          default: st <= WAIT;
        endcase
      end
    end
  end

  always_ff @(posedge clk) ram_rd_data <= mem[ram_rd_addr];

endmodule
