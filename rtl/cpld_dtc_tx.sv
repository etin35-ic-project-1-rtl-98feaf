// cpld_dtc_tx: DTC TX FSM and serializers of the front-end CPLD (Fig. 35,
// Fig. 37 and Fig. 38 of the design description).
//
// Sends 16-bit words to the SRU on the two DDR lines (data and return), four
// bits per DTC clock: a 2-bit counter marks the word slots of four clocks,
// tx_word is loaded into a shift register at the start of each slot and
// shifted out most significant nibble first.  Nibble bit 3 goes on the data
// line's first half, bit 2 on its second half, bits 1 and 0 likewise on the
// return line.  Between frames the idle word 0x0000 is sent.
// Frames, chosen in IDLE with priority reply > event > status:
//   reply   0xBC50, 0xF7F7, address (2 words), data (2 words); frame_state is
//           high meanwhile (handshake with the reply_rdy FSM)
//   status  0xBC50, 0xDCDC, 0x0000, status word (only bit 0 used)
//   event   0xBC50, 0x5C5C, then 32-bit words as two 16-bit words each:
//           event FIFO data when available, the dummy 0x80128012 while the
//           FIFO is empty but the SALTRO controller is still reading, and the
//           trailer 0xC5D5C5D5 once the FIFO is empty and event_done is set;
//           a status frame (without sync word) follows the trailer.
// An event frame starts when the event FIFO is not empty (or an event ended
// with no data).  The FIFO is read one slot ahead of use, which covers its
// one-clock read latency.  Header, sync and dummy words follow the design
// description; the trailer value, the word order within frames and the
// nibble-to-line mapping are this implementation's choices.
module cpld_dtc_tx
  import readout_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        reply_rdy,
  input  logic [31:0] reply_addr,
  input  logic [31:0] reply_data,
  output logic        frame_state,
  input  logic        status_req,
  input  logic [15:0] status_bits,
  input  logic        fifo_empty,
  output logic        fifo_rd_en,
  input  logic [31:0] fifo_q,
  input  logic        event_done,
  output logic        event_done_clr,
  output logic [1:0]  dtc_data,     // [1] first half, [0] second half
  output logic [1:0]  dtc_return,
  output logic [15:0] event_frames,
  output logic [15:0] dummy_words
);

  typedef enum logic [3:0] {
    IDLE, R_SYNC, R_HDR, R_A1, R_A0, R_D1, R_D0,
    S_SYNC, S_HDR, S_W1, S_W0,
    E_SYNC, E_HDR, E_HI, E_LO
  } st_t;
  typedef enum logic [1:0] {K_DATA, K_DUMMY, K_TRAILER} kind_t;

  st_t         st, st_nx;
  kind_t       kind;
  logic [1:0]  cnt;
  logic [15:0] shreg, word_nx, lo_hold;
  logic        status_pend, is_trailer, slot_end, decide;
  logic [31:0] w32;

  assign slot_end    = (cnt == 2'd3);
  assign frame_state = (st >= R_SYNC) && (st <= R_D0);
  assign decide      = (cnt == 2'd0) && (st == E_HDR || (st == E_LO && !is_trailer));
  assign fifo_rd_en  = decide && !fifo_empty;
  assign w32         = (kind == K_DATA) ? fifo_q : (kind == K_TRAILER) ? EVENT_TRAILER : EVENT_DUMMY;

  always_comb begin
    st_nx   = st;
    word_nx = WORD_IDLE;
    case (st)
      IDLE: begin
        if (reply_rdy)                       begin st_nx = R_SYNC; word_nx = WORD_SYNC; end
        else if (!fifo_empty || event_done)  begin st_nx = E_SYNC; word_nx = WORD_SYNC; end
        else if (status_pend)                begin st_nx = S_SYNC; word_nx = WORD_SYNC; end
      end
      R_SYNC: begin st_nx = R_HDR; word_nx = WORD_REPLY;        end
      R_HDR:  begin st_nx = R_A1;  word_nx = reply_addr[31:16]; end
      R_A1:   begin st_nx = R_A0;  word_nx = reply_addr[15:0];  end
      R_A0:   begin st_nx = R_D1;  word_nx = reply_data[31:16]; end
      R_D1:   begin st_nx = R_D0;  word_nx = reply_data[15:0];  end
      R_D0:   begin st_nx = IDLE;  word_nx = WORD_IDLE;         end
      S_SYNC: begin st_nx = S_HDR; word_nx = WORD_STATUS;       end
      S_HDR:  begin st_nx = S_W1;  word_nx = 16'h0000;          end
      S_W1:   begin st_nx = S_W0;  word_nx = status_bits;       end
      S_W0:   begin st_nx = IDLE;  word_nx = WORD_IDLE;         end
      E_SYNC: begin st_nx = E_HDR; word_nx = WORD_EVENT;        end
      E_HDR:  begin st_nx = E_HI;  word_nx = w32[31:16];        end
      E_HI:   begin st_nx = E_LO;  word_nx = lo_hold;           end
      E_LO: begin
        if (is_trailer) begin st_nx = S_HDR; word_nx = WORD_STATUS; end
        else            begin st_nx = E_HI;  word_nx = w32[31:16];  end
      end
      default: st_nx = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st             <= IDLE;
      cnt            <= '0;
      shreg          <= '0;
      kind           <= K_DUMMY;
      lo_hold        <= '0;
      is_trailer     <= 1'b0;
      status_pend    <= 1'b0;
      event_done_clr <= 1'b0;
      dtc_data       <= '0;
      dtc_return     <= '0;
      event_frames   <= '0;
      dummy_words    <= '0;
    end else begin
      cnt            <= cnt + 2'd1;
      event_done_clr <= 1'b0;
      if (status_req) status_pend <= 1'b1;
      if (decide) begin
        if (!fifo_empty)     kind <= K_DATA;
        else if (event_done) begin
          kind           <= K_TRAILER;
          event_done_clr <= 1'b1;
        end
        else                 kind <= K_DUMMY;
      end
      if (slot_end) begin
        st    <= st_nx;
        shreg <= word_nx;
        if (st_nx == E_HI) begin
          lo_hold    <= w32[15:0];
          is_trailer <= (kind == K_TRAILER);
          if (kind == K_DUMMY) dummy_words <= dummy_words + 16'd1;
        end
        if (st == IDLE && st_nx == E_SYNC) begin
          event_frames <= event_frames + 16'd1;
          is_trailer   <= 1'b0;
        end
        if (st_nx == S_HDR) status_pend <= 1'b0;
      end else begin
        shreg <= {shreg[11:0], 4'h0};
      end
      dtc_data   <= shreg[15:14];
      dtc_return <= shreg[13:12];
    end
  end

endmodule
