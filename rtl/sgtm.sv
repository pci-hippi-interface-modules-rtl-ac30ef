// sgtm - Scatter-Gather Table Memory (256 kB = 64k x 32-bit words).
//
// The host fills the table through the PCI pass-through port (port A, read
// and write); the DMA engine reads it (port B, read only). Both ports are
// synchronous with one cycle of read latency and share one clock, the PCI
// clock. On the Destination board word i holds the host byte address of
// page i of the receive buffer; on the Source board entries are two words,
// {address} and {flags, word count} (see dma_read_engine).
//
// The 256 kB size is taken from the block diagrams; the dual-port structure
// and the entry layouts are this design's choice.
module sgtm #(
  parameter int unsigned WORDS = 65536
) (
  input  logic                      clk,
  // host port
  input  logic                      a_we,
  input  logic [$clog2(WORDS)-1:0]  a_addr,
  input  logic [31:0]               a_wdata,
  output logic [31:0]               a_rdata,
  // DMA engine port
  input  logic [$clog2(WORDS)-1:0]  b_addr,
  output logic [31:0]               b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
