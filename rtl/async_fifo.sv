// async_fifo - dual-clock FIFO, the elastic buffer between the PCI and the
// HIPPI clock domains (1k words x 36 bits on both boards).
//
// Write and read pointers are one bit wider than the address and cross the
// clock boundary in Gray code through two-flop synchronisers. Each side sees
// a conservative fill level: wr_count may over-state the fill (the read
// pointer arrives late), rd_count may under-state it, so flow control built
// on them never overflows or underflows.
//
// Read side is first-word-fall-through: rd_data shows the head word while
// rd_empty is low; rd_en pops it. wr_en with wr_full high is ignored.
// Both resets are active low and are expected to be asserted together.
//
// The size follows the block diagrams (1k x 36); the Gray-pointer structure
// and the show-ahead read port are this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 1024     // power of two
) (
  input  logic                     wr_clk,
  input  logic                     wr_rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     wr_full,
  output logic [$clog2(DEPTH):0]   wr_count,

  input  logic                     rd_clk,
  input  logic                     rd_rst_n,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_empty,
  output logic [$clog2(DEPTH):0]   rd_count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2;   // read pointer in write domain
  logic [AW:0] wr_gray_r1, wr_gray_r2;   // write pointer in read domain
  logic [AW:0] rd_bin_w, wr_bin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
    end
  end

  assign rd_bin_w = gray2bin(rd_gray_w2);
  assign wr_count = wr_bin - rd_bin_w;
  assign wr_full  = (wr_count == (AW+1)'(DEPTH));

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_bin  <= '0;
      wr_gray <= '0;
    end else if (wr_en && !wr_full) begin
      wr_bin  <= wr_bin + 1'b1;
      wr_gray <= bin2gray(wr_bin + 1'b1);
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  // ---------------- read domain ----------------
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
    end
  end

  assign wr_bin_r = gray2bin(wr_gray_r2);
  assign rd_count = wr_bin_r - rd_bin;
  assign rd_empty = (rd_count == '0);
  assign rd_data  = mem[rd_bin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_bin  <= '0;
      rd_gray <= '0;
    end else if (rd_en && !rd_empty) begin
      rd_bin  <= rd_bin + 1'b1;
      rd_gray <= bin2gray(rd_bin + 1'b1);
    end
  end

endmodule
