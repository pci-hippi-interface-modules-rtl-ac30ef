// hippi_pci_link - a Source board and a Destination board joined by one
// simplex HIPPI-32 link: the data path of a HIPPI connection from the memory
// of one PCI host to the memory of another.
//
// The HIPPI cable signals of the two boards are wired straight through
// (REQUEST, DATA, PARITY, PACKET, BURST towards the destination; CONNECT and
// READY back). Both boards share the HIPPI clock, which the real cable
// carries from source to destination. Each board keeps its own PCI clock,
// reset, host pass-through port, bus-master port and interrupt, brought out
// here with s_ and d_ prefixes. A HIPPI switch, which would sit in the cable
// in a network, is not part of this model. The HIPPI INTERCONNECT lines
// carry no logic here and are omitted.
//
// Timing is that of the two boards: a full burst every 259 HIPPI clocks, so
// about 98.8 MByte/s at 25 MHz when both host buses keep up. The point to
// point Source-to-Destination link follows the HIPPI description; sharing
// one clock net between the boards is this model's simplification.
module hippi_pci_link
  import hippi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned SGT_WORDS  = 65536,
  parameter int unsigned HIST_WORDS = 65536,
  parameter int unsigned PAGE_BYTES = 8192
) (
  input  logic         hippi_clk,
  input  logic         hippi_rst_n,
  // Source host
  input  logic         s_pci_clk,
  input  logic         s_pci_rst_n,
  input  logic         s_ht_we,
  input  logic [17:0]  s_ht_addr,
  input  logic [31:0]  s_ht_wdata,
  output logic [31:0]  s_ht_rdata,
  output logic         s_irq,
  output logic         s_rq_valid,
  output logic [31:0]  s_rq_addr,
  input  logic         s_rq_ready,
  input  logic         s_rs_valid,
  input  logic [31:0]  s_rs_data,
  // Destination host
  input  logic         d_pci_clk,
  input  logic         d_pci_rst_n,
  input  logic         d_ht_we,
  input  logic [17:0]  d_ht_addr,
  input  logic [31:0]  d_ht_wdata,
  output logic [31:0]  d_ht_rdata,
  output logic         d_irq,
  output logic         d_pm_valid,
  output logic [31:0]  d_pm_addr,
  output logic [31:0]  d_pm_data,
  input  logic         d_pm_ready
);
  logic               request, connect, ready, packet, burst;
  logic [DATA_W-1:0]  data;
  logic [PAR_W-1:0]   parity;

  hippi_source #(.FIFO_DEPTH(FIFO_DEPTH), .SGT_WORDS(SGT_WORDS)) u_src (
    .pci_clk(s_pci_clk), .pci_rst_n(s_pci_rst_n),
    .hippi_clk, .hippi_rst_n,
    .h_request(request), .h_connect(connect), .h_data(data), .h_parity(parity),
    .h_ready(ready), .h_packet(packet), .h_burst(burst),
    .ht_we(s_ht_we), .ht_addr(s_ht_addr), .ht_wdata(s_ht_wdata), .ht_rdata(s_ht_rdata),
    .irq(s_irq),
    .rq_valid(s_rq_valid), .rq_addr(s_rq_addr), .rq_ready(s_rq_ready),
    .rs_valid(s_rs_valid), .rs_data(s_rs_data)
  );

  hippi_destination #(.FIFO_DEPTH(FIFO_DEPTH), .SGT_WORDS(SGT_WORDS),
                      .HIST_WORDS(HIST_WORDS), .PAGE_BYTES(PAGE_BYTES)) u_dst (
    .pci_clk(d_pci_clk), .pci_rst_n(d_pci_rst_n),
    .hippi_clk, .hippi_rst_n,
    .h_request(request), .h_connect(connect), .h_data(data), .h_parity(parity),
    .h_ready(ready), .h_packet(packet), .h_burst(burst),
    .ht_we(d_ht_we), .ht_addr(d_ht_addr), .ht_wdata(d_ht_wdata), .ht_rdata(d_ht_rdata),
    .irq(d_irq),
    .pm_valid(d_pm_valid), .pm_addr(d_pm_addr), .pm_data(d_pm_data), .pm_ready(d_pm_ready)
  );

endmodule
