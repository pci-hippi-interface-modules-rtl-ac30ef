// history_memory - History Memory of the Destination board (256 kB =
// 64k x 32-bit words).
//
// The DMA write engine appends two-word records of HIPPI protocol
// information and data errors (port W); the host reads them through the PCI
// pass-through port after the connection has ended (port R, one cycle read
// latency). One clock, the PCI clock.
//
// Size from the Destination block diagram; the record layout is set by
// dma_write_engine and is this design's own.
module history_memory #(
  parameter int unsigned WORDS = 65536
) (
  input  logic                      clk,
  input  logic                      w_en,
  input  logic [$clog2(WORDS)-1:0]  w_addr,
  input  logic [31:0]               w_data,
  input  logic [$clog2(WORDS)-1:0]  r_addr,
  output logic [31:0]               r_data
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (w_en) mem[w_addr] <= w_data;
    r_data <= mem[r_addr];
  end

endmodule
