// hippi_rx_model - behavioural HIPPI-PH destination used to check Source
// testbenches. It answers REQUEST with CONNECT, keeps up to max_credit
// READY pulses outstanding (one per two cycles at most), and records what
// arrives: the I-Field, every data word, each burst's length and the cycle
// it started, packet ends (as word counts), LLRC and parity mismatches.
module hippi_rx_model (
  input  logic        clk,
  input  logic        request,
  output logic        connect,
  input  logic [31:0] data,
  input  logic [3:0]  parity,
  output logic        ready,
  input  logic        packet,
  input  logic        burst
);
  int          max_credit = 4;
  int          granted = 0;
  logic [31:0] ifield = 0;
  logic [31:0] words [$];
  int          burst_len [$];
  longint      burst_start [$];
  int          pkt_end_at [$];
  int          llrc_err = 0, par_err = 0, conns = 0, conn_ends = 0;
  longint      cyc = 0;
  logic        p_burst = 0, p_packet = 0, p_req = 0;
  logic [31:0] acc = 0;
  int          blen = 0;

  function automatic logic [3:0] par(input logic [31:0] d);
    for (int i = 0; i < 4; i++) par[i] = ~^d[8*i +: 8];
  endfunction

  initial begin
    connect = 0;
    ready = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    ready <= 0;
    if (request && !connect && !p_req) begin
      ifield = data;
      conns++;
    end
    if (request && !connect) connect <= 1;
    if (!request && connect) begin
      connect <= 0;
      conn_ends++;
    end
    p_req <= request;
    if (burst) begin
      if (!p_burst) burst_start.push_back(cyc);
      words.push_back(data);
      if (parity != par(data)) par_err++;
      acc ^= data;
      blen++;
    end else if (p_burst) begin
      if (data != (acc ^ 32'(blen))) llrc_err++;
      burst_len.push_back(blen);
      acc = 0;
      blen = 0;
      granted--;
    end
    if (!packet && p_packet) pkt_end_at.push_back(words.size());
    p_burst <= burst;
    p_packet <= packet;
    if (connect && request && !ready && granted < max_credit) begin
      ready <= 1;
      granted++;
    end
    if (!connect) granted = 0;
  end
endmodule
