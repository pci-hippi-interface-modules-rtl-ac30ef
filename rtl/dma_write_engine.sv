// dma_write_engine - DMA write engine of the Destination board.
//
// Runs in the PCI clock domain. It empties the data FIFO into host memory
// through the PCI controller's bus-master port, so that a whole HIPPI
// connection lands in a host buffer without interrupts, and logs the
// protocol events of the connection in the History Memory.
//
// How it works:
//  * The host writes the number of valid scatter-gather entries
//    (REG_SGT_COUNT) and arms the engine (REG_CTRL bit 0). Entry i of the
//    SGTM is the host byte address of logical page i of the receive buffer.
//    The engine keeps a logical byte offset; when it crosses into a new page
//    it fetches that page's physical address from the SGTM by itself.
//  * Each FIFO word is popped, its four byte-parity bits are checked, and it
//    is written to host memory (pm_valid held until pm_ready), one word per
//    clock while the FIFO has data and the host accepts. A parity
//    error is logged with the host address of the word, so software finds
//    the bad data in memory after the connection ends.
//  * Events from the HIPPI side are taken when the engine has moved exactly
//    as many words as the event's index, so history records line up with the
//    data. Each record is two words:
//      word 0 = {kind[3:0], logical byte offset[27:0]}, word 1 = payload.
//    Only the low 28 offset bits fit the record, so offsets wrap beyond
//    256 MB; the word count in the payload of end records does not.
//  * The interrupt is raised only at connection end, or on a serious error:
//    FIFO overflow or running out of scatter-gather entries (the rest of the
//    connection is then drained and discarded). After connection end the
//    engine disarms itself; the host reads the history and re-arms it.
//
// Registers (word offsets, one cycle read latency):
//   0 CTRL   w: bit0 arm, bit1 clear interrupt     r: bit0 armed
//   1 STATUS r: {hist_full, buf_overrun, overflow, llrc_err, parity_err,
//              conn_done, connected}  (bits 6..0)
//   2 SGT_COUNT  3 WORDS (words of the connection)  4 HIST_PTR (words)
//
// Page-segmented buffer, SGTM, History Memory and interrupt policy follow the
// Destination description. Page size, register map and record layout are
// this design's choices.
module dma_write_engine
  import hippi_pkg::*;
#(
  parameter int unsigned PAGE_BYTES = 8192,
  parameter int unsigned SGT_WORDS  = 65536,
  parameter int unsigned HIST_WORDS = 65536
) (
  input  logic                          clk,     // PCI clock
  input  logic                          rst_n,
  // register port
  input  logic                          reg_we,
  input  logic [2:0]                    reg_addr,
  input  logic [31:0]                   reg_wdata,
  output logic [31:0]                   reg_rdata,
  output logic                          irq,
  // to HIPPI side: armed for a connection
  output logic                          accept,
  input  logic                          hippi_connected,  // asynchronous
  // data FIFO read side (show-ahead)
  output logic                          fifo_rd_en,
  input  logic [WORD_W-1:0]             fifo_rd_data,
  input  logic                          fifo_rd_empty,
  // event FIFO read side (show-ahead)
  output logic                          ev_rd_en,
  input  hippi_event_t                  ev_rd_data,
  input  logic                          ev_rd_empty,
  // SGTM read port (one cycle latency)
  output logic [$clog2(SGT_WORDS)-1:0]  sgt_addr,
  input  logic [31:0]                   sgt_data,
  // History Memory write port
  output logic                          hist_we,
  output logic [$clog2(HIST_WORDS)-1:0] hist_addr,
  output logic [31:0]                   hist_wdata,
  // PCI bus-master write port
  output logic                          pm_valid,
  output logic [31:0]                   pm_addr,
  output logic [31:0]                   pm_data,
  input  logic                          pm_ready
);
  localparam int unsigned PW = $clog2(PAGE_BYTES);
  localparam int unsigned SW = $clog2(SGT_WORDS);
  localparam int unsigned HW = $clog2(HIST_WORDS);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_SGT, S_WRITE, S_HIST0, S_HIST1} state_e;
  state_e state;

  logic             armed;
  logic [31:0]      sgt_count;
  logic [31:0]      words;          // words popped this connection
  logic [31:0]      offset;         // logical byte offset in the buffer
  logic [31:0]      page_base;
  logic             page_valid;
  logic [SW:0]      page_idx;
  logic [HW:0]      hist_ptr;
  logic [DATA_W-1:0] wdata;
  logic             wpar_bad;
  ev_kind_e         h_kind;
  logic [31:0]      h_payload, h_offset;
  logic             end_after_hist;
  logic             st_conn_done, st_parity, st_llrc, st_ovf, st_overrun, st_hfull;
  logic             connected_s;

  sync2 u_sync_conn (.clk, .rst_n, .d(hippi_connected), .q(connected_s));

  assign accept = armed;

  wire event_due = !ev_rd_empty &&
                   (ev_rd_data.kind == EV_CONN_START || ev_rd_data.index == words);

  // back-to-back words: the next FIFO word is taken in the cycle the current
  // one is accepted, unless it starts a new page, an event is due first or
  // the current word needs a parity record
  wire page_last = (offset[PW-1:0] == PW'(PAGE_BYTES - 4));
  wire chain     = (state == S_WRITE) && pm_ready && !wpar_bad && !page_last &&
                   !event_due && !fifo_rd_empty;

  // combinational handshakes
  always_comb begin
    fifo_rd_en = chain;
    ev_rd_en   = 1'b0;
    if (state == S_RUN) begin
      if (event_due)
        ev_rd_en = 1'b1;
      else if (!fifo_rd_empty && (page_valid || page_idx >= (SW+1)'(sgt_count)))
        fifo_rd_en = 1'b1;
    end
  end

  assign sgt_addr = page_idx[SW-1:0];
  assign pm_valid = (state == S_WRITE);
  assign pm_addr  = page_base + {{(32-PW){1'b0}}, offset[PW-1:0]};
  assign pm_data  = wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      armed <= 1'b0;
      irq   <= 1'b0;
      sgt_count <= '0;
      words <= '0; offset <= '0; page_base <= '0; page_valid <= 1'b0; page_idx <= '0;
      hist_ptr <= '0; hist_we <= 1'b0; hist_addr <= '0; hist_wdata <= '0;
      wdata <= '0; wpar_bad <= 1'b0;
      h_kind <= EV_CONN_START; h_payload <= '0; h_offset <= '0; end_after_hist <= 1'b0;
      {st_conn_done, st_parity, st_llrc, st_ovf, st_overrun, st_hfull} <= '0;
      reg_rdata <= '0;
    end else begin
      hist_we <= 1'b0;

      // ---------------- registers ----------------
      if (reg_we) begin
        unique case (reg_addr)
          REG_CTRL: begin
            if (reg_wdata[1]) irq <= 1'b0;
            if (reg_wdata[0] && state == S_IDLE) begin
              armed <= 1'b1;
              state <= S_RUN;
              words <= '0; offset <= '0; page_valid <= 1'b0; page_idx <= '0;
              hist_ptr <= '0;
              {st_conn_done, st_parity, st_llrc, st_ovf, st_overrun, st_hfull} <= '0;
            end
          end
          REG_SGT_COUNT: sgt_count <= reg_wdata;
          default: ;
        endcase
      end
      unique case (reg_addr)
        REG_CTRL:      reg_rdata <= {31'd0, armed};
        REG_STATUS:    reg_rdata <= {25'd0, st_hfull, st_overrun, st_ovf, st_llrc,
                                     st_parity, st_conn_done, connected_s};
        REG_SGT_COUNT: reg_rdata <= sgt_count;
        REG_WORDS:     reg_rdata <= words;
        REG_HIST_PTR:  reg_rdata <= 32'(hist_ptr);
        default:       reg_rdata <= '0;
      endcase

      // ---------------- data movement ----------------
      unique case (state)
        S_IDLE: ;

        S_RUN: begin
          if (event_due) begin
            h_kind    <= ev_rd_data.kind;
            h_payload <= ev_rd_data.payload;
            h_offset  <= offset;
            end_after_hist <= (ev_rd_data.kind == EV_CONN_END);
            if (ev_rd_data.kind == EV_LLRC_ERR) st_llrc <= 1'b1;
            if (ev_rd_data.kind == EV_OVERFLOW) begin
              st_ovf <= 1'b1;
              irq    <= 1'b1;
            end
            state <= S_HIST0;
          end else if (!fifo_rd_empty) begin
            if (page_idx >= (SW+1)'(sgt_count)) begin
              // no buffer left: discard, report once
              words <= words + 1'b1;
              if (!st_overrun) begin
                st_overrun <= 1'b1;
                irq        <= 1'b1;
                h_kind     <= EV_BUF_OVERRUN;
                h_payload  <= words;
                h_offset   <= offset;
                end_after_hist <= 1'b0;
                state      <= S_HIST0;
              end
            end else if (!page_valid) begin
              state <= S_SGT;            // sgt_addr already shows page_idx
            end else begin
              wdata    <= fifo_rd_data[DATA_W-1:0];
              wpar_bad <= (fifo_rd_data[WORD_W-1:DATA_W] != byte_parity(fifo_rd_data[DATA_W-1:0]));
              words    <= words + 1'b1;
              state    <= S_WRITE;
            end
          end
        end

        S_SGT: begin
          page_base  <= sgt_data;
          page_valid <= 1'b1;
          state      <= S_RUN;
        end

        S_WRITE: if (chain) begin
          offset   <= offset + 32'd4;
          wdata    <= fifo_rd_data[DATA_W-1:0];
          wpar_bad <= (fifo_rd_data[WORD_W-1:DATA_W] != byte_parity(fifo_rd_data[DATA_W-1:0]));
          words    <= words + 1'b1;
        end else if (pm_ready) begin
          offset <= offset + 32'd4;
          if (page_last) begin
            page_valid <= 1'b0;
            page_idx   <= page_idx + 1'b1;
          end
          if (wpar_bad) begin
            st_parity <= 1'b1;
            h_kind    <= EV_PARITY_ERR;
            h_payload <= pm_addr;
            h_offset  <= offset;
            end_after_hist <= 1'b0;
            state     <= S_HIST0;
          end else begin
            state <= S_RUN;
          end
        end

        S_HIST0: begin
          if (hist_ptr + 2 <= (HW+1)'(HIST_WORDS)) begin
            hist_we    <= 1'b1;
            hist_addr  <= hist_ptr[HW-1:0];
            hist_wdata <= {h_kind, h_offset[27:0]};
            state      <= S_HIST1;
          end else begin
            st_hfull <= 1'b1;
            state    <= end_after_hist ? S_IDLE : S_RUN;
            if (end_after_hist) begin
              armed <= 1'b0; st_conn_done <= 1'b1; irq <= 1'b1;
            end
          end
        end

        S_HIST1: begin
          hist_we    <= 1'b1;
          hist_addr  <= hist_addr + 1'b1;
          hist_wdata <= h_payload;
          hist_ptr   <= hist_ptr + (HW+1)'(2);
          if (end_after_hist) begin
            armed        <= 1'b0;
            st_conn_done <= 1'b1;
            irq          <= 1'b1;
            state        <= S_IDLE;
          end else begin
            state <= S_RUN;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
