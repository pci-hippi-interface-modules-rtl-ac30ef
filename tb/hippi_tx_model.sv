// hippi_tx_model - behavioural HIPPI-PH source used to drive Destination
// testbenches. Tasks: open_conn(ifield), send_packet(n, seed, bad_par_at,
// bad_llrc), close_conn(). A burst is sent only against a READY credit, with
// the same cycle layout as the RTL source: BURST high for the words, one
// LLRC cycle, one idle cycle. Packet data word k of a packet with seed s is
// word_of(s, k). Counts READY pulses and the HIPPI cycles spent sending.
module hippi_tx_model (
  input  logic        clk,
  output logic        request,
  input  logic        connect,
  output logic [31:0] data,
  output logic [3:0]  parity,
  input  logic        ready,
  output logic        packet,
  output logic        burst
);
  int credits = 0;
  int readies = 0;
  int bursts  = 0;

  function automatic logic [31:0] word_of(input int seed, input int k);
    return (32'(seed) << 20) ^ 32'(k) ^ 32'hC0DE_0000;
  endfunction

  function automatic logic [3:0] par(input logic [31:0] d);
    for (int i = 0; i < 4; i++) par[i] = ~^d[8*i +: 8];
  endfunction

  initial begin
    request = 0; data = 0; parity = par(0); packet = 0; burst = 0;
  end

  always @(posedge clk) if (ready) begin
    credits++;
    readies++;
  end

  task automatic open_conn(input logic [31:0] ifield);
    @(posedge clk);
    data <= ifield; parity <= par(ifield); request <= 1;
    while (!connect) @(posedge clk);
    @(posedge clk);
    data <= 0; parity <= par(0);
  endtask

  task automatic close_conn();
    @(posedge clk);
    request <= 0;
    while (connect) @(posedge clk);
  endtask

  // bad_par_at: index of a word sent with its parity inverted (-1: none)
  // bad_llrc:   index of the burst sent with a wrong LLRC (-1: none)
  task automatic send_packet(input int n, input int seed, input int bad_par_at = -1,
                             input int bad_llrc = -1);
    int k = 0, b = 0;
    @(posedge clk);
    packet <= 1;
    while (k < n) begin
      int len;
      logic [31:0] acc;
      len = (n - k > 256) ? 256 : n - k;
      @(posedge clk);
      while (credits == 0) @(posedge clk);
      credits--;
      acc = 0;
      for (int i = 0; i < len; i++) begin
        logic [31:0] w;
        w = word_of(seed, k);
        acc ^= w;
        burst <= 1; data <= w;
        parity <= (k == bad_par_at) ? ~par(w) : par(w);
        k++;
        @(posedge clk);
      end
      burst <= 0;
      data <= acc ^ 32'(len) ^ ((b == bad_llrc) ? 32'h1 : 32'h0);
      parity <= par(acc ^ 32'(len));
      bursts++;
      b++;
      @(posedge clk);
      data <= 0; parity <= par(0);
    end
    @(posedge clk);
    packet <= 0;
    @(posedge clk);
  endtask
endmodule
