// src_hippi_ctrl - FIFO & HIPPI control of the Source board.
//
// Runs in the HIPPI clock domain and drives the HIPPI-PH source side of the
// link from the data FIFO and the event FIFO filled by the DMA read engine.
//
// How it works:
//  * A CONN_START event puts its I-Field on the data bus and raises REQUEST.
//    When CONNECT comes back the bus is cleared and the connection is open.
//  * Each READY pulse from the destination is one burst credit.
//  * A packet is opened (PACKET high) when data is waiting. Inside it a burst
//    starts when there is a credit and the FIFO holds the whole burst, since
//    a HIPPI burst cannot pause: 256 words, or fewer if the next PKT_END
//    event is closer than that (a short burst ends the packet). The burst is
//    sent one word per clock with BURST high and is followed by its LLRC
//    word (XOR of the words XOR length) and one idle cycle.
//  * When as many words have been sent as a PKT_END event's index, PACKET
//    drops; at a CONN_END event REQUEST drops and conn_closed_tgl toggles to
//    tell the PCI side the connection is over. A new connection waits until
//    the destination has dropped CONNECT.
//
// Timing: a full burst takes 256 + 3 clocks (LLRC, idle, decision), i.e.
// 98.8 % of the 100 MByte/s of a 25 MHz HIPPI-32 link.
//
// The signals, the burst/packet/connection framing and the READY credit
// scheme follow the HIPPI description; the exact cycle layout around a
// burst and the short-burst-last rule are this design's choices.
module src_hippi_ctrl
  import hippi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic                        clk,      // HIPPI clock, 25 MHz
  input  logic                        rst_n,
  // HIPPI cable
  output logic                        h_request,
  input  logic                        h_connect,
  output logic [DATA_W-1:0]           h_data,
  output logic [PAR_W-1:0]            h_parity,
  input  logic                        h_ready,
  output logic                        h_packet,
  output logic                        h_burst,
  // data FIFO read side (show-ahead)
  output logic                        fifo_rd_en,
  input  logic [WORD_W-1:0]           fifo_rd_data,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_rd_count,
  // event FIFO read side (show-ahead)
  output logic                        ev_rd_en,
  input  hippi_event_t                ev_rd_data,
  input  logic                        ev_rd_empty,
  // to the PCI side
  output logic                        conn_closed_tgl
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_CONN, S_PKT, S_BURST, S_LLRC, S_GAP} state_e;
  state_e state;

  logic              r_connect, r_ready;
  logic [7:0]        credits;
  logic [31:0]       sent;
  logic [8:0]        blen, cnt;
  logic [DATA_W-1:0] xor_acc;
  logic [8:0]        next_len;
  logic              ev_here;     // head event applies at the current word

  assign ev_here = !ev_rd_empty && ev_rd_data.index == sent;

  // length of the next burst
  always_comb begin
    logic [31:0] remain;
    remain   = ev_rd_data.index - sent;
    next_len = 9'(BURST_WORDS);
    if (!ev_rd_empty && (ev_rd_data.kind == EV_PKT_END || ev_rd_data.kind == EV_CONN_END)
        && remain < 32'(BURST_WORDS))
      next_len = remain[8:0];
  end

  always_comb begin
    fifo_rd_en = (state == S_BURST);
    ev_rd_en   = 1'b0;
    unique case (state)
      S_IDLE: ev_rd_en = !ev_rd_empty && !r_connect;
      S_CONN: ev_rd_en = ev_here && ev_rd_data.kind != EV_PKT_END;
      S_PKT:  ev_rd_en = ev_here && ev_rd_data.kind == EV_PKT_END;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      r_connect <= 1'b0; r_ready <= 1'b0;
      h_request <= 1'b0; h_data <= '0; h_parity <= '0; h_packet <= 1'b0; h_burst <= 1'b0;
      credits <= '0; sent <= '0; blen <= '0; cnt <= '0; xor_acc <= '0;
      conn_closed_tgl <= 1'b0;
    end else begin
      logic [7:0] c;
      r_connect <= h_connect;
      r_ready   <= h_ready;
      c = credits;
      if (r_ready && c != 8'hFF) c = c + 1'b1;

      unique case (state)
        S_IDLE: begin
          c = '0;
          if (!ev_rd_empty && !r_connect && ev_rd_data.kind == EV_CONN_START) begin
            h_data    <= ev_rd_data.payload;        // I-Field
            h_parity  <= byte_parity(ev_rd_data.payload);
            h_request <= 1'b1;
            sent      <= '0;
            state     <= S_REQ;
          end
        end

        S_REQ: if (r_connect) begin
          h_data   <= '0;
          h_parity <= byte_parity('0);
          state    <= S_CONN;
        end

        S_CONN: begin
          if (ev_here && ev_rd_data.kind == EV_CONN_END) begin
            h_request       <= 1'b0;
            conn_closed_tgl <= ~conn_closed_tgl;
            state           <= S_IDLE;
          end else if (fifo_rd_count != 0 || (ev_here && ev_rd_data.kind == EV_PKT_END)) begin
            h_packet <= 1'b1;
            state    <= S_PKT;
          end
        end

        S_PKT: begin
          if (ev_here && ev_rd_data.kind == EV_PKT_END) begin
            h_packet <= 1'b0;
            state    <= S_CONN;
          end else if (c != 0 && next_len != 0 && fifo_rd_count >= CW'(next_len)) begin
            c = c - 1'b1;
            blen    <= next_len;
            cnt     <= '0;
            xor_acc <= '0;
            state   <= S_BURST;
          end
        end

        S_BURST: begin
          h_burst  <= 1'b1;
          h_data   <= fifo_rd_data[DATA_W-1:0];
          h_parity <= fifo_rd_data[WORD_W-1:DATA_W];
          xor_acc  <= xor_acc ^ fifo_rd_data[DATA_W-1:0];
          sent     <= sent + 1'b1;
          cnt      <= cnt + 1'b1;
          if (cnt + 1'b1 == blen) state <= S_LLRC;
        end

        S_LLRC: begin
          h_burst  <= 1'b0;
          h_data   <= llrc_word(xor_acc, blen);
          h_parity <= byte_parity(llrc_word(xor_acc, blen));
          state    <= S_GAP;
        end

        S_GAP: begin
          h_data   <= '0;
          h_parity <= byte_parity('0);
          state    <= S_PKT;
        end

        default: state <= S_IDLE;
      endcase
      credits <= c;
    end
  end

endmodule
