// hippi_destination - the HIPPI "Destination" PCI board.
//
// Receives HIPPI connections and moves their data into host memory by DMA,
// without interrupting the host until the connection has ended.
//
//   HIPPI cable -> dst_hippi_ctrl -> data FIFO (1k x 36) -----> dma_write_engine -> PCI master
//                                 \-> event FIFO (16 deep) -/        |      |
//                                                                    SGTM   History Memory
//
// dst_hippi_ctrl and the write side of both FIFOs run on the HIPPI clock;
// the engine, SGTM, History Memory and host port run on the PCI clock.
//
// Host (pass-through) port: word address ht_addr[17:0]; bits [17:16] pick
// the region (0 = engine registers, 1 = SGTM, 2 = History Memory) and bits
// [15:0] the word in it. Reads return one cycle after the address.
// The PCI master port writes one 32-bit word per pm_valid/pm_ready
// handshake to host byte address pm_addr. irq is a level, cleared through
// the CTRL register.
//
// Partitioning, FIFO and memory sizes follow the Destination block diagram;
// the event FIFO, the host address map and the port handshakes stand in for
// the bought-in PCI and HIPPI interface chips and are this design's own.
//
// The FIFO fill counts on the sides that do not need them, and the event
// FIFO's full flag, are left unconnected: the HIPPI control paces the data
// FIFO by its write-side count, and the event FIFO is assumed not to fill
// (see dst_hippi_ctrl). It could fill only if the source sent more than 16
// packet edges or errors while the data ahead of them waits in the FIFO.
module hippi_destination
  import hippi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned SGT_WORDS  = 65536,
  parameter int unsigned HIST_WORDS = 65536,
  parameter int unsigned PAGE_BYTES = 8192,
  parameter int unsigned EV_DEPTH   = 16
) (
  input  logic               pci_clk,
  input  logic               pci_rst_n,
  input  logic               hippi_clk,
  input  logic               hippi_rst_n,
  // HIPPI cable
  input  logic               h_request,
  output logic               h_connect,
  input  logic [DATA_W-1:0]  h_data,
  input  logic [PAR_W-1:0]   h_parity,
  output logic               h_ready,
  input  logic               h_packet,
  input  logic               h_burst,
  // host pass-through target
  input  logic               ht_we,
  input  logic [17:0]        ht_addr,
  input  logic [31:0]        ht_wdata,
  output logic [31:0]        ht_rdata,
  output logic               irq,
  // PCI bus-master write
  output logic               pm_valid,
  output logic [31:0]        pm_addr,
  output logic [31:0]        pm_data,
  input  logic               pm_ready
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned SW = $clog2(SGT_WORDS);
  localparam int unsigned HW = $clog2(HIST_WORDS);

  logic              accept, connected;
  logic              f_wr_en, f_wr_full, f_rd_en, f_rd_empty;
  logic [WORD_W-1:0] f_wr_data, f_rd_data;
  logic [CW-1:0]     f_wr_count, f_rd_count;
  logic              e_wr_en, e_rd_en, e_rd_empty, e_wr_full;
  hippi_event_t      e_wr_data, e_rd_data;
  logic [$clog2(EV_DEPTH):0] e_wr_count, e_rd_count;
  logic [SW-1:0]     sgt_addr;
  logic [31:0]       sgt_data, sgt_host_rdata, hist_host_rdata, reg_rdata;
  logic              hist_we;
  logic [HW-1:0]     hist_addr;
  logic [31:0]       hist_wdata;
  logic [1:0]        rgn_q;

  dst_hippi_ctrl #(.FIFO_DEPTH(FIFO_DEPTH)) u_hctl (
    .clk(hippi_clk), .rst_n(hippi_rst_n),
    .h_request, .h_connect, .h_data, .h_parity, .h_ready, .h_packet, .h_burst,
    .accept,
    .fifo_wr_en(f_wr_en), .fifo_wr_data(f_wr_data), .fifo_wr_full(f_wr_full),
    .fifo_wr_count(f_wr_count),
    .ev_wr_en(e_wr_en), .ev_wr_data(e_wr_data),
    .connected
  );

  async_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_data_fifo (
    .wr_clk(hippi_clk), .wr_rst_n(hippi_rst_n), .wr_en(f_wr_en), .wr_data(f_wr_data),
    .wr_full(f_wr_full), .wr_count(f_wr_count),
    .rd_clk(pci_clk), .rd_rst_n(pci_rst_n), .rd_en(f_rd_en), .rd_data(f_rd_data),
    .rd_empty(f_rd_empty), .rd_count(f_rd_count)
  );

  async_fifo #(.WIDTH(EV_W), .DEPTH(EV_DEPTH)) u_event_fifo (
    .wr_clk(hippi_clk), .wr_rst_n(hippi_rst_n), .wr_en(e_wr_en), .wr_data(e_wr_data),
    .wr_full(e_wr_full), .wr_count(e_wr_count),
    .rd_clk(pci_clk), .rd_rst_n(pci_rst_n), .rd_en(e_rd_en), .rd_data(e_rd_data),
    .rd_empty(e_rd_empty), .rd_count(e_rd_count)
  );

  dma_write_engine #(.PAGE_BYTES(PAGE_BYTES), .SGT_WORDS(SGT_WORDS),
                     .HIST_WORDS(HIST_WORDS)) u_dma (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .reg_we(ht_we && ht_addr[17:16] == RGN_REGS), .reg_addr(ht_addr[2:0]),
    .reg_wdata(ht_wdata), .reg_rdata, .irq,
    .accept, .hippi_connected(connected),
    .fifo_rd_en(f_rd_en), .fifo_rd_data(f_rd_data), .fifo_rd_empty(f_rd_empty),
    .ev_rd_en(e_rd_en), .ev_rd_data(e_rd_data), .ev_rd_empty(e_rd_empty),
    .sgt_addr, .sgt_data,
    .hist_we, .hist_addr, .hist_wdata,
    .pm_valid, .pm_addr, .pm_data, .pm_ready
  );

  sgtm #(.WORDS(SGT_WORDS)) u_sgtm (
    .clk(pci_clk),
    .a_we(ht_we && ht_addr[17:16] == RGN_SGTM), .a_addr(ht_addr[SW-1:0]),
    .a_wdata(ht_wdata), .a_rdata(sgt_host_rdata),
    .b_addr(sgt_addr), .b_rdata(sgt_data)
  );

  history_memory #(.WORDS(HIST_WORDS)) u_hist (
    .clk(pci_clk),
    .w_en(hist_we), .w_addr(hist_addr), .w_data(hist_wdata),
    .r_addr(ht_addr[HW-1:0]), .r_data(hist_host_rdata)
  );

  always_ff @(posedge pci_clk or negedge pci_rst_n) begin
    if (!pci_rst_n) rgn_q <= RGN_REGS;
    else            rgn_q <= ht_addr[17:16];
  end

  always_comb begin
    unique case (rgn_q)
      RGN_SGTM: ht_rdata = sgt_host_rdata;
      RGN_HIST: ht_rdata = hist_host_rdata;
      default:  ht_rdata = reg_rdata;
    endcase
  end

endmodule
