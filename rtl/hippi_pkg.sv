// hippi_pkg - constants, types and helper functions shared by the PCI-HIPPI
// Source and Destination boards.
//
// HIPPI moves 32-bit words, each with four byte-parity bits, in bursts of at
// most 256 words; a burst is followed by one LLRC (length-longitudinal
// redundancy check) word. The boards carry a 36-bit word {parity, data}
// through their 1k x 36 FIFO. Protocol events (connection start and end,
// packet delimiters, errors) cross between the PCI and HIPPI clock domains
// in a separate small event FIFO, each event tagged with the number of data
// words that precede it in the connection, so that the far side can act on
// it at exactly the right point of the data stream.
//
// Burst length, word width and parity count follow the HIPPI description.
// Odd byte parity and the LLRC rule (XOR of all burst words, XORed with the
// burst length) are this design's choice; the event encoding, history
// record layout and register maps are this design's own.
package hippi_pkg;

  localparam int unsigned BURST_WORDS = 256;   // HIPPI full burst
  localparam int unsigned DATA_W      = 32;    // HIPPI-32 data bus
  localparam int unsigned PAR_W       = 4;     // one parity bit per byte
  localparam int unsigned WORD_W      = DATA_W + PAR_W;   // 36-bit FIFO word

  // Protocol events carried in the event FIFOs and logged in the history.
  typedef enum logic [3:0] {
    EV_CONN_START = 4'd1,   // payload: I-Field
    EV_PKT_START  = 4'd2,
    EV_PKT_END    = 4'd3,   // payload: words in connection so far
    EV_LLRC_ERR   = 4'd4,   // payload: received LLRC word
    EV_CONN_END   = 4'd5,   // payload: words in connection
    EV_OVERFLOW   = 4'd6,   // data arrived with the FIFO full
    EV_PARITY_ERR = 4'd7,   // payload: host byte address of the bad word
    EV_BUF_OVERRUN= 4'd8    // scatter-gather table exhausted
  } ev_kind_e;

  typedef struct packed {
    ev_kind_e    kind;
    logic [31:0] index;     // data words of the connection before this event
    logic [31:0] payload;
  } hippi_event_t;

  localparam int unsigned EV_W = $bits(hippi_event_t);

  // Odd parity per byte: each parity bit makes its byte plus itself odd.
  function automatic logic [PAR_W-1:0] byte_parity(input logic [DATA_W-1:0] d);
    logic [PAR_W-1:0] p;
    for (int i = 0; i < PAR_W; i++) p[i] = ~^d[8*i +: 8];
    return p;
  endfunction

  // LLRC word sent after a burst: XOR of the burst's words, XOR burst length.
  function automatic logic [DATA_W-1:0] llrc_word(input logic [DATA_W-1:0] xor_acc,
                                                  input logic [8:0] len);
    return xor_acc ^ DATA_W'(len);
  endfunction

  // Register offsets of the DMA engines (word addresses in region 0).
  localparam logic [2:0] REG_CTRL      = 3'd0;
  localparam logic [2:0] REG_STATUS    = 3'd1;
  localparam logic [2:0] REG_SGT_COUNT = 3'd2;
  localparam logic [2:0] REG_WORDS     = 3'd3;
  localparam logic [2:0] REG_HIST_PTR  = 3'd4;   // Destination only
  localparam logic [2:0] REG_IFIELD    = 3'd4;   // Source only
  localparam logic [2:0] REG_BUF_WORDS = 3'd5;   // Source only

  // Host (pass-through) address regions, bits [17:16] of the word address.
  localparam logic [1:0] RGN_REGS = 2'd0;
  localparam logic [1:0] RGN_SGTM = 2'd1;
  localparam logic [1:0] RGN_HIST = 2'd2;

endpackage
