// readout_fsm: readout FSM between the DTC RX readout RAM of one link and
// the readout UDP EMAC (an AXI4-Stream byte sink).
//
// When the link's RAM holds a complete event (ram_flag), the FSM puts the
// event size in bytes (4 x word_count) on tuser and streams the words out
// byte by byte, least significant byte first, one byte per clock while
// tready is high.  tlast marks the last byte.  After the last byte it pulses
// rd_confirm, which releases the RAM for the next event.
// RAM reads have one clock of latency; the next word is read ahead while the
// current one is being sent, so the stream has no gaps.  As in the design
// description only one DTC link (the one wired to this FSM) is read out.
// tuser stays valid for the whole packet.  An empty event is confirmed
// without a transfer (this implementation's choice).
module readout_fsm #(
  parameter int unsigned RAM_AW = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ram_flag,
  input  logic [RAM_AW:0]   word_count,
  output logic [RAM_AW-1:0] ram_rd_addr,
  input  logic [31:0]       ram_rd_data,
  output logic              rd_confirm,
  output logic [7:0]        tdata,
  output logic              tvalid,
  input  logic              tready,
  output logic              tlast,
  output logic [15:0]       tuser
);

  typedef enum logic [2:0] {IDLE, START, LOAD, SEND, DONE} st_t;
  st_t st;

  logic [RAM_AW:0] rd_ptr;      // index of the next word to load
  logic [31:0]     word;
  logic [1:0]      bidx;
  logic            last_word;

  assign ram_rd_addr = rd_ptr[RAM_AW-1:0];
  assign last_word   = (rd_ptr == word_count);
  assign tvalid      = (st == SEND);
  assign tdata       = word[8*bidx +: 8];
  assign tlast       = (st == SEND) && last_word && (bidx == 2'd3);
  assign rd_confirm  = (st == DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= IDLE;
      rd_ptr <= '0;
      word   <= '0;
      bidx   <= '0;
      tuser  <= '0;
    end else begin
      case (st)
        IDLE: begin
          rd_ptr <= '0;
          bidx   <= '0;
          if (ram_flag) begin
            tuser <= 16'({word_count, 2'b00});
            st    <= (word_count == 0) ? DONE : START;
          end
        end
        START: st <= LOAD;
        LOAD: begin
          word   <= ram_rd_data;
          rd_ptr <= rd_ptr + 1'b1;
          st     <= SEND;
        end
        SEND: if (tready) begin
          bidx <= bidx + 2'd1;
          if (bidx == 2'd3) begin
            if (last_word) st <= DONE;
            else begin
              word   <= ram_rd_data;
              rd_ptr <= rd_ptr + 1'b1;
            end
          end
        end
        DONE: st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  // AXI4-Stream rule: data stays stable while valid waits for ready.
  assert property (@(posedge clk) disable iff (rst)
    tvalid && !tready |=> tvalid && $stable(tdata) && $stable(tlast));

endmodule
