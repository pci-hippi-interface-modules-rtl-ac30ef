// dma_read_engine - DMA read engine of the Source board.
//
// Runs in the PCI clock domain. It walks the scatter-gather table, reads the
// host memory it points to through the PCI controller's bus-master port, and
// fills the data FIFO (with byte parity added) and the event FIFO that
// src_hippi_ctrl turns into a HIPPI connection.
//
// SGTM layout:
//   word 0    = memory buffer size in words (the transfer never exceeds it)
//   word 1    = unused
//   entry e (0, 1, ...) occupies words 2e+2 and 2e+3:
//   word 2e+2 = host byte address of the segment (word aligned)
//   word 2e+3 = {conn_end[31], pkt_end[30], 10'b0, word count[19:0]}
// pkt_end closes the HIPPI packet after the segment; conn_end ends the
// connection after it.
//
// How it works: the host fills the SGTM, writes the I-Field and the number
// of entries, and sets CTRL.start. The engine queues CONN_START, loads the
// buffer size from SGTM word 0, then for each entry fetches its two words
// and issues one read request per word. Requests are only issued while the FIFO has room for
// every read still in flight, so returning data is never refused. When all
// of a segment's data is in the FIFO the engine queues PKT_END and/or
// CONN_END with the count of words queued so far. The transfer also stops,
// closing the open packet and the connection, when the buffer size is
// reached, the table ends, or the host sets CTRL.abort. The interrupt is
// raised once the HIPPI side reports the connection closed.
//
// Registers (word offsets, one cycle read latency):
//   0 CTRL w: bit0 start, bit1 abort, bit2 clear interrupt; r: bit0 busy
//   1 STATUS r: {aborted, done, busy}   2 SGT_COUNT   3 WORDS (queued)
//   4 IFIELD   5 BUF_WORDS (read only: the size loaded from the SGTM)
//
// The SGTM holding addresses, packet delimiters, connection end and buffer
// size, and the stop conditions, follow the Source description. The entry
// layout and register map are this design's choices.
module dma_read_engine
  import hippi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned SGT_WORDS  = 65536
) (
  input  logic                          clk,     // PCI clock
  input  logic                          rst_n,
  // register port
  input  logic                          reg_we,
  input  logic [2:0]                    reg_addr,
  input  logic [31:0]                   reg_wdata,
  output logic [31:0]                   reg_rdata,
  output logic                          irq,
  // SGTM read port (one cycle latency)
  output logic [$clog2(SGT_WORDS)-1:0]  sgt_addr,
  input  logic [31:0]                   sgt_data,
  // PCI bus-master read: requests, then in-order data
  output logic                          rq_valid,
  output logic [31:0]                   rq_addr,
  input  logic                          rq_ready,
  input  logic                          rs_valid,
  input  logic [31:0]                   rs_data,
  // data FIFO write side
  output logic                          fifo_wr_en,
  output logic [WORD_W-1:0]             fifo_wr_data,
  input  logic [$clog2(FIFO_DEPTH):0]   fifo_wr_count,
  // event FIFO write side
  output logic                          ev_wr_en,
  output hippi_event_t                  ev_wr_data,
  input  logic                          ev_wr_full,
  // from the HIPPI side (asynchronous toggle)
  input  logic                          conn_closed_tgl
);
  localparam int unsigned SW = $clog2(SGT_WORDS);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_BUF, S_ENT0, S_ENT1, S_ENT2, S_XFER, S_SEG_END, S_PKT_END,
    S_CONN_END, S_WAIT_CLOSE
  } state_e;
  state_e state;

  logic [31:0] ifield, sgt_count, buf_words;
  logic [31:0] entry;
  logic [31:0] issued, queued, last_pkt_end;
  logic [31:0] seg_addr;
  logic [19:0] seg_left;
  logic        seg_pkt_end, seg_conn_end;
  logic [CW:0] inflight;
  logic        busy, done, aborted, abort_req;
  logic        closed_s, closed_q;

  sync2 u_sync_closed (.clk, .rst_n, .d(conn_closed_tgl), .q(closed_s));

  wire stop_issue = abort_req || issued == buf_words;
  wire room       = (CW+1)'(fifo_wr_count) + (CW+1)'(fifo_wr_en) + inflight
                    < (CW+1)'(FIFO_DEPTH);

  assign rq_valid = (state == S_XFER) && seg_left != 0 && !stop_issue && room;
  assign rq_addr  = seg_addr;
  // word 0: buffer size; entry e: words 2e+2 and 2e+3
  wire [SW-2:0] ent_w = (SW-1)'(entry + 32'd1);
  assign sgt_addr = (state == S_START) ? '0 :
                    (state == S_ENT0)  ? {ent_w, 1'b0}
                                       : {ent_w, 1'b1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ifield <= '0; sgt_count <= '0; buf_words <= '0;
      entry <= '0; issued <= '0; queued <= '0; last_pkt_end <= '0;
      seg_addr <= '0; seg_left <= '0; seg_pkt_end <= 1'b0; seg_conn_end <= 1'b0;
      inflight <= '0;
      busy <= 1'b0; done <= 1'b0; aborted <= 1'b0; abort_req <= 1'b0; irq <= 1'b0;
      closed_q <= 1'b0;
      fifo_wr_en <= 1'b0; fifo_wr_data <= '0;
      ev_wr_en <= 1'b0; ev_wr_data <= '0;
      reg_rdata <= '0;
    end else begin
      logic [CW:0] inf;
      fifo_wr_en <= 1'b0;
      ev_wr_en   <= 1'b0;
      closed_q   <= closed_s;

      // ---------------- registers ----------------
      if (reg_we) begin
        unique case (reg_addr)
          REG_CTRL: begin
            if (reg_wdata[2]) irq <= 1'b0;
            if (reg_wdata[1] && busy) begin
              abort_req <= 1'b1;
              aborted   <= 1'b1;
            end
            if (reg_wdata[0] && state == S_IDLE) begin
              busy <= 1'b1; done <= 1'b0; aborted <= 1'b0; abort_req <= 1'b0;
              entry <= '0; issued <= '0; queued <= '0; last_pkt_end <= '0;
              state <= S_START;
            end
          end
          REG_SGT_COUNT: sgt_count <= reg_wdata;
          REG_IFIELD:    ifield    <= reg_wdata;
          default: ;
        endcase
      end
      unique case (reg_addr)
        REG_CTRL:      reg_rdata <= {31'd0, busy};
        REG_STATUS:    reg_rdata <= {29'd0, aborted, done, busy};
        REG_SGT_COUNT: reg_rdata <= sgt_count;
        REG_WORDS:     reg_rdata <= queued;
        REG_IFIELD:    reg_rdata <= ifield;
        REG_BUF_WORDS: reg_rdata <= buf_words;
        default:       reg_rdata <= '0;
      endcase

      // ---------------- returning read data ----------------
      inf = inflight;
      if (rq_valid && rq_ready) inf = inf + 1'b1;
      if (rs_valid) begin
        inf = inf - 1'b1;
        fifo_wr_en   <= 1'b1;
        fifo_wr_data <= {byte_parity(rs_data), rs_data};
        queued       <= queued + 1'b1;
      end
      inflight <= inf;

      // ---------------- control ----------------
      unique case (state)
        S_IDLE: ;

        S_START: if (!ev_wr_full) begin
          ev_wr_en   <= 1'b1;
          ev_wr_data <= '{kind: EV_CONN_START, index: '0, payload: ifield};
          state      <= S_BUF;     // SGTM word 0 being read
        end

        S_BUF: begin
          buf_words <= sgt_data;
          state     <= S_ENT0;
        end

        S_ENT0: begin
          if (abort_req || issued == buf_words || entry >= sgt_count)
            state <= S_PKT_END;
          else
            state <= S_ENT1;       // address word being read
        end

        S_ENT1: begin
          seg_addr <= sgt_data;
          state    <= S_ENT2;      // flag word being read
        end

        S_ENT2: begin
          seg_left     <= sgt_data[19:0];
          seg_pkt_end  <= sgt_data[30];
          seg_conn_end <= sgt_data[31];
          entry        <= entry + 1'b1;
          state        <= S_XFER;
        end

        S_XFER: begin
          if (rq_valid && rq_ready) begin
            seg_addr <= seg_addr + 32'd4;
            seg_left <= seg_left - 1'b1;
            issued   <= issued + 1'b1;
          end
          if ((seg_left == 0 || stop_issue) && inflight == 0 && !rs_valid)
            state <= (seg_left == 0) ? S_SEG_END : S_PKT_END;
        end

        S_SEG_END: begin
          if (seg_pkt_end || seg_conn_end) begin
            if (!ev_wr_full) begin
              if (seg_pkt_end && queued != last_pkt_end) begin
                ev_wr_en     <= 1'b1;
                ev_wr_data   <= '{kind: EV_PKT_END, index: queued, payload: queued};
                last_pkt_end <= queued;
                seg_pkt_end  <= 1'b0;
              end else begin
                seg_pkt_end <= 1'b0;
                state <= seg_conn_end ? S_PKT_END : S_ENT0;
              end
            end
          end else begin
            state <= S_ENT0;
          end
        end

        // close any open packet, then the connection
        S_PKT_END: if (!ev_wr_full) begin
          if (queued != last_pkt_end) begin
            ev_wr_en     <= 1'b1;
            ev_wr_data   <= '{kind: EV_PKT_END, index: queued, payload: queued};
            last_pkt_end <= queued;
          end
          state <= S_CONN_END;
        end

        S_CONN_END: if (!ev_wr_full) begin
          ev_wr_en   <= 1'b1;
          ev_wr_data <= '{kind: EV_CONN_END, index: queued, payload: queued};
          state      <= S_WAIT_CLOSE;
        end

        S_WAIT_CLOSE: if (closed_s != closed_q) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          abort_req <= 1'b0;
          irq       <= 1'b1;
          state     <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
