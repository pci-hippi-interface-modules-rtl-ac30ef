// hippi_source - the HIPPI "Source" PCI board.
//
// Reads a host memory buffer by DMA, following the scatter-gather table, and
// sends it over HIPPI as one connection of one or more packets.
//
//   PCI master -> dma_read_engine -> data FIFO (1k x 36) ----> src_hippi_ctrl -> HIPPI cable
//                       |        \-> event FIFO (16 deep) -/
//                      SGTM
//
// The engine, SGTM and host port run on the PCI clock; src_hippi_ctrl and
// the read side of both FIFOs run on the HIPPI clock.
//
// Host (pass-through) port: word address ht_addr[17:0]; bits [17:16] pick
// the region (0 = engine registers, 1 = SGTM) and bits [15:0] the word.
// Reads return one cycle after the address. The PCI master read port takes
// one word-address request per rq_valid/rq_ready handshake and returns the
// data in order, one word per rs_valid pulse, any number of cycles later.
//
// Partitioning and sizes follow the Source block diagram, in which the DMA
// read engine and the FIFO & HIPPI control share one programmable device;
// here they are two modules because they run on different clocks.
//
// The data FIFO's full and empty flags and the event FIFO's counts are left
// unconnected: both sides of the data FIFO work from its fill counts, and
// the event FIFO is paced by its full and empty flags.
module hippi_source
  import hippi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned SGT_WORDS  = 65536,
  parameter int unsigned EV_DEPTH   = 16
) (
  input  logic               pci_clk,
  input  logic               pci_rst_n,
  input  logic               hippi_clk,
  input  logic               hippi_rst_n,
  // HIPPI cable
  output logic               h_request,
  input  logic               h_connect,
  output logic [DATA_W-1:0]  h_data,
  output logic [PAR_W-1:0]   h_parity,
  input  logic               h_ready,
  output logic               h_packet,
  output logic               h_burst,
  // host pass-through target
  input  logic               ht_we,
  input  logic [17:0]        ht_addr,
  input  logic [31:0]        ht_wdata,
  output logic [31:0]        ht_rdata,
  output logic               irq,
  // PCI bus-master read
  output logic               rq_valid,
  output logic [31:0]        rq_addr,
  input  logic               rq_ready,
  input  logic               rs_valid,
  input  logic [31:0]        rs_data
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned SW = $clog2(SGT_WORDS);

  logic              f_wr_en, f_wr_full, f_rd_en, f_rd_empty;
  logic [WORD_W-1:0] f_wr_data, f_rd_data;
  logic [CW-1:0]     f_wr_count, f_rd_count;
  logic              e_wr_en, e_rd_en, e_rd_empty, e_wr_full;
  hippi_event_t      e_wr_data, e_rd_data;
  logic [$clog2(EV_DEPTH):0] e_wr_count, e_rd_count;
  logic [SW-1:0]     sgt_addr;
  logic [31:0]       sgt_data, sgt_host_rdata, reg_rdata;
  logic              closed_tgl;
  logic [1:0]        rgn_q;

  dma_read_engine #(.FIFO_DEPTH(FIFO_DEPTH), .SGT_WORDS(SGT_WORDS)) u_dma (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .reg_we(ht_we && ht_addr[17:16] == RGN_REGS), .reg_addr(ht_addr[2:0]),
    .reg_wdata(ht_wdata), .reg_rdata, .irq,
    .sgt_addr, .sgt_data,
    .rq_valid, .rq_addr, .rq_ready, .rs_valid, .rs_data,
    .fifo_wr_en(f_wr_en), .fifo_wr_data(f_wr_data), .fifo_wr_count(f_wr_count),
    .ev_wr_en(e_wr_en), .ev_wr_data(e_wr_data), .ev_wr_full(e_wr_full),
    .conn_closed_tgl(closed_tgl)
  );

  async_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_data_fifo (
    .wr_clk(pci_clk), .wr_rst_n(pci_rst_n), .wr_en(f_wr_en), .wr_data(f_wr_data),
    .wr_full(f_wr_full), .wr_count(f_wr_count),
    .rd_clk(hippi_clk), .rd_rst_n(hippi_rst_n), .rd_en(f_rd_en), .rd_data(f_rd_data),
    .rd_empty(f_rd_empty), .rd_count(f_rd_count)
  );

  async_fifo #(.WIDTH(EV_W), .DEPTH(EV_DEPTH)) u_event_fifo (
    .wr_clk(pci_clk), .wr_rst_n(pci_rst_n), .wr_en(e_wr_en), .wr_data(e_wr_data),
    .wr_full(e_wr_full), .wr_count(e_wr_count),
    .rd_clk(hippi_clk), .rd_rst_n(hippi_rst_n), .rd_en(e_rd_en), .rd_data(e_rd_data),
    .rd_empty(e_rd_empty), .rd_count(e_rd_count)
  );

  src_hippi_ctrl #(.FIFO_DEPTH(FIFO_DEPTH)) u_hctl (
    .clk(hippi_clk), .rst_n(hippi_rst_n),
    .h_request, .h_connect, .h_data, .h_parity, .h_ready, .h_packet, .h_burst,
    .fifo_rd_en(f_rd_en), .fifo_rd_data(f_rd_data), .fifo_rd_count(f_rd_count),
    .ev_rd_en(e_rd_en), .ev_rd_data(e_rd_data), .ev_rd_empty(e_rd_empty),
    .conn_closed_tgl(closed_tgl)
  );

  sgtm #(.WORDS(SGT_WORDS)) u_sgtm (
    .clk(pci_clk),
    .a_we(ht_we && ht_addr[17:16] == RGN_SGTM), .a_addr(ht_addr[SW-1:0]),
    .a_wdata(ht_wdata), .a_rdata(sgt_host_rdata),
    .b_addr(sgt_addr), .b_rdata(sgt_data)
  );

  always_ff @(posedge pci_clk or negedge pci_rst_n) begin
    if (!pci_rst_n) rgn_q <= RGN_REGS;
    else            rgn_q <= ht_addr[17:16];
  end

  assign ht_rdata = (rgn_q == RGN_SGTM) ? sgt_host_rdata : reg_rdata;

endmodule
