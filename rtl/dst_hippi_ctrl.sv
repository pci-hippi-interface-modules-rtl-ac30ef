// dst_hippi_ctrl - FIFO & HIPPI control of the Destination board.
//
// Runs in the HIPPI clock domain and speaks the HIPPI-PH destination side of
// the link: REQUEST/CONNECT connection set-up with the I-Field, look-ahead
// flow control by READY pulses, and reception of PACKET-framed bursts of up
// to 256 words, each followed by an LLRC word.
//
// How it works:
//  * Cable inputs are registered once. When REQUEST is high, no connection
//    is open and the host has armed the board (`accept`, synchronised here),
//    the I-Field on the data bus is captured, CONNECT is raised and a
//    CONN_START event is queued. When REQUEST falls the connection ends:
//    CONNECT drops and CONN_END is queued.
//  * Every word seen with BURST high is written, with its parity bits, into
//    the 36-bit data FIFO; nothing is checked here, so the DMA engine can
//    report a parity error with the host address where the word landed.
//  * The cycle after BURST falls carries the LLRC. It is compared with the
//    XOR of the burst's words XOR its length; a mismatch queues LLRC_ERR.
//  * One READY pulse (one cycle high, at least one low between pulses) gives
//    the source one burst. A pulse is sent only while the FIFO has room for
//    every burst already granted plus this one, so a 1k FIFO keeps up to four
//    bursts in flight and the source never overruns it. A word that still
//    finds the FIFO full is dropped and OVERFLOW is queued.
//  * PACKET rising and falling queue PKT_START and PKT_END. Each event holds
//    the number of data words of the connection that precede it.
//
// At most one event is queued per cycle; a well-behaved source separates
// burst end, packet end and connection end by at least one cycle. The event
// FIFO is assumed never to fill (the DMA engine drains it much faster than
// events arrive).
//
// The protocol follows the HIPPI description; the credit rule, the event
// tagging and the LLRC rule are this design's choices.
module dst_hippi_ctrl
  import hippi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic                        clk,      // HIPPI clock, 25 MHz
  input  logic                        rst_n,
  // HIPPI cable (Fig. 3 signals)
  input  logic                        h_request,
  output logic                        h_connect,
  input  logic [DATA_W-1:0]           h_data,
  input  logic [PAR_W-1:0]            h_parity,
  output logic                        h_ready,
  input  logic                        h_packet,
  input  logic                        h_burst,
  // from the DMA engine (PCI clock domain): board armed for a connection
  input  logic                        accept,
  // data FIFO write side
  output logic                        fifo_wr_en,
  output logic [WORD_W-1:0]           fifo_wr_data,
  input  logic                        fifo_wr_full,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_wr_count,
  // event FIFO write side
  output logic                        ev_wr_en,
  output hippi_event_t                ev_wr_data,
  // status
  output logic                        connected
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic              accept_s;
  logic              r_req, r_pkt, r_burst, p_pkt, p_burst;
  logic [DATA_W-1:0] r_data;
  logic [PAR_W-1:0]  r_par;
  logic [31:0]       wcount;      // words of this connection so far
  logic [DATA_W-1:0] xor_acc;
  logic [8:0]        blen;
  logic [3:0]        granted;     // READY pulses not yet used by a burst
  logic              ready_ok;

  sync2 u_sync_accept (.clk, .rst_n, .d(accept), .q(accept_s));

  // room for every granted burst plus one more
  assign ready_ok = ((CW+2)'(granted) + 1'b1) * (CW+2)'(BURST_WORDS)
                    + (CW+2)'(fifo_wr_count) <= (CW+2)'(FIFO_DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_req <= 1'b0; r_pkt <= 1'b0; r_burst <= 1'b0;
      p_pkt <= 1'b0; p_burst <= 1'b0;
      r_data <= '0; r_par <= '0;
    end else begin
      r_req   <= h_request;
      r_pkt   <= h_packet;
      r_burst <= h_burst;
      r_data  <= h_data;
      r_par   <= h_parity;
      p_pkt   <= r_pkt;
      p_burst <= r_burst;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      connected  <= 1'b0;
      h_connect  <= 1'b0;
      h_ready    <= 1'b0;
      wcount     <= '0;
      xor_acc    <= '0;
      blen       <= '0;
      granted    <= '0;
      fifo_wr_en <= 1'b0;
      fifo_wr_data <= '0;
      ev_wr_en   <= 1'b0;
      ev_wr_data <= '0;
    end else begin
      fifo_wr_en <= 1'b0;
      ev_wr_en   <= 1'b0;
      h_ready    <= 1'b0;

      if (!connected) begin
        granted <= '0;
        if (r_req && accept_s) begin
          connected  <= 1'b1;
          h_connect  <= 1'b1;
          wcount     <= '0;
          xor_acc    <= '0;
          blen       <= '0;
          ev_wr_en   <= 1'b1;
          ev_wr_data <= '{kind: EV_CONN_START, index: '0, payload: r_data};
        end
      end else begin
        logic [3:0] g;
        g = granted;

        // data words
        if (r_burst) begin
          xor_acc <= xor_acc ^ r_data;
          blen    <= blen + 1'b1;
          if (!fifo_wr_full) begin
            fifo_wr_en   <= 1'b1;
            fifo_wr_data <= {r_par, r_data};
          end else begin
            ev_wr_en   <= 1'b1;
            ev_wr_data <= '{kind: EV_OVERFLOW, index: wcount, payload: wcount};
          end
          wcount <= wcount + 1'b1;
        end

        // LLRC cycle closes the burst and uses up one READY
        if (!r_burst && p_burst) begin
          if (r_data != llrc_word(xor_acc, blen)) begin
            ev_wr_en   <= 1'b1;
            ev_wr_data <= '{kind: EV_LLRC_ERR, index: wcount, payload: r_data};
          end
          xor_acc <= '0;
          blen    <= '0;
          if (g != 0) g = g - 1'b1;
        end

        if (r_pkt && !p_pkt) begin
          ev_wr_en   <= 1'b1;
          ev_wr_data <= '{kind: EV_PKT_START, index: wcount, payload: wcount};
        end
        if (!r_pkt && p_pkt) begin
          ev_wr_en   <= 1'b1;
          ev_wr_data <= '{kind: EV_PKT_END, index: wcount, payload: wcount};
        end

        // look-ahead flow control
        if (!h_ready && ready_ok && r_req && g != 4'hF) begin
          h_ready <= 1'b1;
          g = g + 1'b1;
        end
        granted <= g;

        // end of connection
        if (!r_req && !r_pkt) begin
          connected  <= 1'b0;
          h_connect  <= 1'b0;
          h_ready    <= 1'b0;
          ev_wr_en   <= 1'b1;
          ev_wr_data <= '{kind: EV_CONN_END, index: wcount, payload: wcount};
        end
      end
    end
  end

endmodule
