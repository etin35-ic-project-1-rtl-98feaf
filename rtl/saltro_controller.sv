// saltro_controller: SALTRO interface controller with readout LIFO and event
// FIFO (Fig. 31 and Fig. 33 of the design description).
//
// Two FSMs, a 40-bit channel RAM used as a LIFO and a 32-bit event FIFO.
//
// Command Control FSM (CCFSM) owns the SALTRO bus (BD, cstbn, writen):
//   CSR access (command from the demux):
//     ST_CMD1  bdout registers take {address, data}; writen takes the type
//     ST_CMD2  cstbn low; broadcast (address bit 18) -> ST_CMD4, else wait
//              for ackn low (read data sampled from BD[19:0]) -> ST_CMD3
//     ST_CMD3  cstbn high, wait for ackn to rise, ack the command
//     ST_CMD4  wait a few clocks, cstbn high, ack the command
//   Channel readout (CHRDO fast command), channels 0..NCH-1:
//     ST_TRSF1 all channels done -> ST_TRSF7; channel masked -> ST_MASK
//     ST_MASK  ch_addr + 1, mask register shifted
//     ST_TRSF2 bdout takes the CHRDO command; wait while the transfer FSM
//              is still emptying the channel RAM (con_busy) or the event FIFO
//              could not take a whole channel (fifo_almost_full)
//     ST_TRSF3 cstbn low, wr_addr = 0
//     ST_TRSF4 wait for ackn low (or timeout)
//     ST_TRSF5 cstbn high, wait for trsfn low (transfer starts, or timeout)
//     ST_TRSF6 each dstbn low writes BD into the channel RAM at wr_addr++;
//              trsfn high ends the channel and starts the transfer FSM
//     ST_TRSF7/8 read pointer increment (RPINC, broadcast) and wait for the
//              transfer FSM; then event_done is raised
// Transfer FSM: reads the channel RAM backwards (LIFO: the SALTRO sends a
// channel last sample first) and writes two 32-bit words per 40-bit word into
// the event FIFO: {6'b0, BD[39:30], 6'b0, BD[29:20]} then
// {6'b0, BD[19:10], 6'b0, BD[9:0]}.  con_busy is high until the RAM is empty.
// Abort and reset fast commands end a readout at once (event_done is still
// raised so that a started event frame is closed).
// The SALTRO bus is split into bd_out/bd_oe/bd_in; the tristate pad is
// outside.  The instruction codes, the bit positions of channel and
// broadcast in the address, the 10-bit packing, timeouts and sizes are this
// implementation's choices; the states follow the design description.
module saltro_controller
  import readout_pkg::*;
#(
  parameter int unsigned NCH      = 16,   // analog channels
  parameter int unsigned CHRAM_AW = 8,    // channel RAM 256 x 40 bit
  parameter int unsigned FIFO_AW  = 10,   // event FIFO 1024 x 32 bit
  parameter int unsigned TIMEOUT  = 255
) (
  input  logic        clk,
  input  logic        rst,
  // CSR commands from the demux
  input  logic        saltro_cmd_exec,
  input  logic        saltro_cmd_rw,     // 1 = read
  input  logic [19:0] saltro_cmd_addr,
  input  logic [19:0] saltro_cmd_rx,     // write data
  output logic [19:0] saltro_cmd_tx,     // read data
  output logic        saltro_cmd_ack,
  // fast commands
  input  logic        rdo_cmd,
  input  logic        abort_cmd,
  input  logic        reset_cmd,
  input  logic [15:0] ch_mask,
  // SALTRO bus
  output logic [39:0] bd_out,
  output logic [1:0]  bd_oe,             // [1] BD[39:20], [0] BD[19:0]
  input  logic [39:0] bd_in,
  output logic        cstbn,
  output logic        writen,
  input  logic        ackn,
  input  logic        trsfn,
  input  logic        dstbn,
  // event FIFO read side (one clock read latency)
  input  logic        fifo_rd_en,
  output logic [31:0] fifo_q,
  output logic        fifo_empty,
  output logic        fifo_almost_full,
  // event status
  output logic        event_done,
  input  logic        event_done_clr,
  output logic        rdo_busy,
  output logic        con_busy,
  output logic [15:0] timeouts
);

  typedef enum logic [4:0] {
    IDLE, ST_CMD1, ST_CMD2, ST_CMD3, ST_CMD4,
    ST_TRSF1, ST_MASK, ST_TRSF2, ST_TRSF3, ST_TRSF4, ST_TRSF5, ST_TRSF6,
    ST_TRSF7, ST_TRSF8, ST_TRSF9
  } cc_t;
  cc_t st;

  logic [4:0]          ch_addr;
  logic [15:0]         mask_sh;
  logic [7:0]          tcnt;
  logic [CHRAM_AW:0]   wr_addr;
  logic [39:0]         ch_ram [2**CHRAM_AW];
  logic                con_start;
  logic                stop;

  assign stop     = abort_cmd || reset_cmd;
  assign rdo_busy = (st >= ST_TRSF1);

  // ---------------- event FIFO ----------------
  logic [31:0]       ev_fifo [2**FIFO_AW];
  logic [FIFO_AW:0]  f_wptr, f_rptr, f_count;
  logic              f_we;
  logic [31:0]       f_wdata;

  assign f_count          = f_wptr - f_rptr;
  assign fifo_empty       = (f_count == 0);
  assign fifo_almost_full = (f_count > (FIFO_AW+1)'(2**FIFO_AW - 2*(2**CHRAM_AW)));

  always_ff @(posedge clk) begin
    if (rst) begin
      f_wptr <= '0;
      f_rptr <= '0;
      fifo_q <= '0;
    end else begin
      if (f_we && !f_count[FIFO_AW]) begin
        ev_fifo[f_wptr[FIFO_AW-1:0]] <= f_wdata;
        f_wptr <= f_wptr + 1'b1;
      end
      if (fifo_rd_en && !fifo_empty) begin
        fifo_q <= ev_fifo[f_rptr[FIFO_AW-1:0]];
        f_rptr <= f_rptr + 1'b1;
      end
    end
  end

  // ---------------- transfer FSM (LIFO read-back) ----------------
  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_HI, C_LO} con_t;
  con_t              cst;
  logic [CHRAM_AW:0] rd_idx;
  logic [39:0]       ram_q;
  logic              last_pair;

  assign con_busy = (cst != C_IDLE);
  assign f_we     = (cst == C_HI) || (cst == C_LO);
  assign f_wdata  = (cst == C_HI) ? {6'd0, ram_q[39:30], 6'd0, ram_q[29:20]}
                                  : {6'd0, ram_q[19:10], 6'd0, ram_q[9:0]};

  always_ff @(posedge clk) ram_q <= ch_ram[rd_idx[CHRAM_AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      cst       <= C_IDLE;
      rd_idx    <= '0;
      last_pair <= 1'b0;
    end else begin
      case (cst)
        C_IDLE: if (con_start && wr_addr != 0) begin
          rd_idx <= wr_addr - 1'b1;
          cst    <= C_WAIT;
        end
        C_WAIT: cst <= C_HI;
        C_HI: begin
          last_pair <= (rd_idx == 0);
          if (rd_idx != 0) rd_idx <= rd_idx - 1'b1;
          cst <= C_LO;
        end
        C_LO: cst <= last_pair ? C_IDLE : C_HI;
        default: cst <= C_IDLE;
      endcase
    end
  end

  // ---------------- command control FSM ----------------
  logic [39:0] bdout;
  logic        bcast;

  assign bd_out = bdout;
  assign bcast  = saltro_cmd_addr[SALTRO_BCAST_BIT];

  always_ff @(posedge clk) begin
    if (rst) begin
      st             <= IDLE;
      ch_addr        <= '0;
      mask_sh        <= '0;
      tcnt           <= '0;
      wr_addr        <= '0;
      bdout          <= '0;
      bd_oe          <= 2'b00;
      cstbn          <= 1'b1;
      writen         <= 1'b1;
      saltro_cmd_tx  <= '0;
      saltro_cmd_ack <= 1'b0;
      event_done     <= 1'b0;
      con_start      <= 1'b0;
      timeouts       <= '0;
    end else begin
      saltro_cmd_ack <= 1'b0;
      con_start      <= 1'b0;
      if (event_done_clr) event_done <= 1'b0;
      tcnt <= tcnt + 8'd1;
      case (st)
        IDLE: begin
          tcnt  <= '0;
          bd_oe <= 2'b00;
          cstbn <= 1'b1;
          if (saltro_cmd_exec && !saltro_cmd_ack) st <= ST_CMD1;
          else if (rdo_cmd) begin
            ch_addr <= '0;
            mask_sh <= ch_mask;
            st      <= ST_TRSF1;
          end
        end
        // ---------- CSR access ----------
        ST_CMD1: begin
          bdout  <= {saltro_cmd_addr, saltro_cmd_rx};
          writen <= saltro_cmd_rw;
          bd_oe  <= {1'b1, !saltro_cmd_rw};
          tcnt   <= '0;
          st     <= ST_CMD2;
        end
        ST_CMD2: begin
          cstbn <= 1'b0;
          if (bcast) begin
            tcnt <= '0;
            st   <= ST_CMD4;
          end else if (!ackn && !cstbn) begin
            saltro_cmd_tx <= bd_in[19:0];
            cstbn         <= 1'b1;
            st            <= ST_CMD3;
          end else if (tcnt == 8'(TIMEOUT)) begin
            timeouts      <= timeouts + 16'd1;
            saltro_cmd_tx <= '0;
            cstbn         <= 1'b1;
            st            <= ST_CMD3;
          end
        end
        ST_CMD3: if (ackn) begin
          saltro_cmd_ack <= 1'b1;
          writen         <= 1'b1;
          bd_oe          <= 2'b00;
          st             <= IDLE;
        end
        ST_CMD4: if (tcnt == 8'd3) begin
          cstbn          <= 1'b1;
          saltro_cmd_ack <= 1'b1;
          writen         <= 1'b1;
          bd_oe          <= 2'b00;
          st             <= IDLE;
        end
        // ---------- channel readout ----------
        ST_TRSF1: begin
          if (ch_addr == 5'(NCH)) st <= ST_TRSF7;
          else if (mask_sh[0])    st <= ST_MASK;
          else                    st <= ST_TRSF2;
        end
        ST_MASK: begin
          ch_addr <= ch_addr + 5'd1;
          mask_sh <= mask_sh >> 1;
          st      <= ST_TRSF1;
        end
        ST_TRSF2: begin
          bdout  <= {11'd0, ch_addr[3:0], SALTRO_CHRDO, 20'd0};
          writen <= 1'b0;
          bd_oe  <= 2'b11;
          tcnt   <= '0;
          if (!con_busy && !con_start && !fifo_almost_full) st <= ST_TRSF3;
        end
        ST_TRSF3: begin
          cstbn   <= 1'b0;
          wr_addr <= '0;
          tcnt    <= '0;
          st      <= ST_TRSF4;
        end
        ST_TRSF4: begin
          if (!ackn) begin
            tcnt <= '0;
            st   <= ST_TRSF5;
          end else if (tcnt == 8'(TIMEOUT)) begin
            timeouts <= timeouts + 16'd1;
            cstbn    <= 1'b1;
            ch_addr  <= ch_addr + 5'd1;
            mask_sh  <= mask_sh >> 1;
            st       <= ST_TRSF1;
          end
        end
        ST_TRSF5: begin
          cstbn  <= 1'b1;
          bd_oe  <= 2'b00;
          writen <= 1'b1;
          if (!trsfn) st <= ST_TRSF6;
          else if (tcnt == 8'(TIMEOUT)) begin
            timeouts <= timeouts + 16'd1;
            ch_addr  <= ch_addr + 5'd1;
            mask_sh  <= mask_sh >> 1;
            st       <= ST_TRSF1;
          end
        end
        ST_TRSF6: begin
          if (!dstbn && !wr_addr[CHRAM_AW]) begin
            ch_ram[wr_addr[CHRAM_AW-1:0]] <= bd_in;
            wr_addr <= wr_addr + 1'b1;
          end
          if (trsfn) begin
            con_start <= 1'b1;
            ch_addr   <= ch_addr + 5'd1;
            mask_sh   <= mask_sh >> 1;
            st        <= ST_TRSF1;
          end
        end
        ST_TRSF7: begin
          bdout  <= {1'b0, 1'b1, 13'd0, SALTRO_RPINC, 20'd0};   // broadcast RPINC
          writen <= 1'b0;
          bd_oe  <= 2'b11;
          cstbn  <= 1'b0;
          tcnt   <= '0;
          st     <= ST_TRSF8;
        end
        ST_TRSF8: if (tcnt == 8'd3) begin
          cstbn <= 1'b1;
          bd_oe <= 2'b00;
          st    <= ST_TRSF9;
        end
        ST_TRSF9: if (!con_busy && !con_start) begin
          event_done <= 1'b1;
          st         <= IDLE;
        end
        default: st <= IDLE;
      endcase
      if (stop && st >= ST_TRSF1) begin
        cstbn      <= 1'b1;
        bd_oe      <= 2'b00;
        writen     <= 1'b1;
        event_done <= 1'b1;
        st         <= IDLE;
      end
    end
  end

endmodule
