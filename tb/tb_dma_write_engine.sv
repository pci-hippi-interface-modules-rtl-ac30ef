// tb_dma_write_engine - checks the Destination DMA write engine with modelled
// FIFOs, SGTM, History Memory and host memory (default 8 kB pages).
// Run 1: a 5000-word connection of two packets over four scattered pages,
// with one word of bad parity and one LLRC error event. Checked: each word at
// the host address the scatter-gather table gives; the history records in
// order with their offsets and payloads (the parity record holds the host
// address of the bad word); the status bits; the interrupt only after the
// connection ends; one word written per PCI clock while nothing stalls.
// Run 2: the table covers one page only; the engine must log a buffer
// overrun, interrupt, discard the rest and still close the connection.
// Run 3: random write stalls on the host bus; data must still be exact.
module tb_dma_write_engine;
  import hippi_pkg::*;
  localparam int PAGE = 8192;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #15 clk = ~clk;

  logic        reg_we = 0;
  logic [2:0]  reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic        irq, accept;
  logic        fifo_rd_en, fifo_rd_empty, ev_rd_en, ev_rd_empty;
  logic [35:0] fifo_rd_data;
  hippi_event_t ev_rd_data;
  logic [15:0] sgt_addr, hist_addr;
  logic [31:0] sgt_data, hist_wdata;
  logic        hist_we;
  logic        pm_valid, pm_ready;
  logic [31:0] pm_addr, pm_data;
  logic        unused_rq_ready, unused_rs_valid;
  logic [31:0] unused_rs_data;

  dma_write_engine #(.PAGE_BYTES(PAGE)) dut (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .irq, .accept,
    .hippi_connected(1'b1),
    .fifo_rd_en, .fifo_rd_data, .fifo_rd_empty,
    .ev_rd_en, .ev_rd_data, .ev_rd_empty,
    .sgt_addr, .sgt_data, .hist_we, .hist_addr, .hist_wdata,
    .pm_valid, .pm_addr, .pm_data, .pm_ready);

  host_mem_model mem (.clk, .wr_valid(pm_valid), .wr_addr(pm_addr), .wr_data(pm_data),
                      .wr_ready(pm_ready), .rq_valid(1'b0), .rq_addr('0),
                      .rq_ready(unused_rq_ready), .rs_valid(unused_rs_valid),
                      .rs_data(unused_rs_data));

  // modelled FIFOs, SGTM and history memory
  logic [35:0]  fifo [$];
  hippi_event_t evq [$];
  logic [31:0]  sgt [int];
  logic [31:0]  hist [int];
  always @(negedge clk) begin
    fifo_rd_empty = (fifo.size() == 0);
    fifo_rd_data  = fifo.size() != 0 ? fifo[0] : '0;
    ev_rd_empty   = (evq.size() == 0);
    ev_rd_data    = evq.size() != 0 ? evq[0] : '0;
  end
  always @(posedge clk) begin
    if (fifo_rd_en && fifo.size() != 0) void'(fifo.pop_front());
    if (ev_rd_en && evq.size() != 0) void'(evq.pop_front());
    sgt_data <= sgt.exists(int'(sgt_addr)) ? sgt[int'(sgt_addr)] : 32'hBAD0_0000;
    if (hist_we) hist[int'(hist_addr)] = hist_wdata;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr_reg(input logic [2:0] a, input logic [31:0] d);
    @(posedge clk); reg_we <= 1; reg_addr <= a; reg_wdata <= d;
    @(posedge clk); reg_we <= 0;
    #1;
  endtask
  task automatic rd_reg(input logic [2:0] a, output logic [31:0] d);
    @(posedge clk); reg_addr <= a;
    @(posedge clk); @(posedge clk); #1 d = reg_rdata;
  endtask

  function automatic logic [31:0] w_of(input int k);
    return 32'h7700_0000 ^ 32'(k * 2654435761);
  endfunction
  task automatic push_words(input int from, input int n, input int bad_at = -1);
    for (int k = from; k < from + n; k++)
      fifo.push_back({(k == bad_at) ? ~byte_parity(w_of(k)) : byte_parity(w_of(k)), w_of(k)});
  endtask
  task automatic push_ev(input ev_kind_e kd, input int idx, input logic [31:0] pl);
    hippi_event_t e;
    e.kind = kd; e.index = 32'(idx); e.payload = pl;
    evq.push_back(e);
  endtask

  int page_map [4] = '{5, 2, 7, 0};
  function automatic logic [31:0] host_addr(input int k);
    return 32'h2000_0000 + 32'(page_map[(k * 4) / PAGE] * PAGE + (k * 4) % PAGE);
  endfunction

  task automatic expect_hist(input int i, input ev_kind_e kd, input int off,
                             input logic [31:0] pl);
    check(hist.exists(2*i) && hist[2*i] == {kd, 28'(off)} && hist[2*i+1] == pl,
          $sformatf("history record %0d: %h %h, want %0d/%0d/%h", i,
                    hist.exists(2*i) ? hist[2*i] : 0, hist.exists(2*i+1) ? hist[2*i+1] : 0,
                    kd, off, pl));
  endtask

  // write-rate monitor
  int writes_in_window = 0;
  longint first_wr = -1, wr_2000 = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (pm_valid && pm_ready) begin
      writes_in_window++;
      if (first_wr < 0) first_wr = cyc;
      if (writes_in_window == 2000) wr_2000 = cyc;
    end
  end

  initial begin
    logic [31:0] r;
    int bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) sgt[i] = 32'h2000_0000 + 32'(page_map[i] * PAGE);

    // ---------------- run 1 ----------------
    push_ev(EV_CONN_START, 0, 32'hFEED_0001);
    push_ev(EV_PKT_START, 0, 0);
    push_words(0, 3000, 1234);
    push_ev(EV_PKT_END, 3000, 3000);
    push_ev(EV_PKT_START, 3000, 3000);
    push_ev(EV_LLRC_ERR, 3100, 32'h1234_5678);
    push_words(3000, 2000);
    wr_reg(REG_SGT_COUNT, 4);
    wr_reg(REG_CTRL, 1);
    check(accept, "armed: accept high");
    repeat (6000) @(posedge clk);
    check(!irq, "no interrupt before connection end");
    check(fifo.size() == 0, "all data taken");
    check(wr_2000 - first_wr + 1 <= 2010,
          $sformatf("2000 words in %0d PCI clocks", wr_2000 - first_wr + 1));
    push_ev(EV_PKT_END, 5000, 5000);
    push_ev(EV_CONN_END, 5000, 5000);
    repeat (30) @(posedge clk);
    check(irq, "interrupt at connection end");
    check(!accept, "disarmed after connection end");
    bad = 0;
    for (int k = 0; k < 5000; k++) if (mem.peek(host_addr(k)) != w_of(k)) bad++;
    check(bad == 0, $sformatf("words at scatter-gather addresses (%0d wrong)", bad));
    expect_hist(0, EV_CONN_START, 0, 32'hFEED_0001);
    expect_hist(1, EV_PKT_START, 0, 0);
    expect_hist(2, EV_PARITY_ERR, 1234 * 4, host_addr(1234));
    expect_hist(3, EV_PKT_END, 12000, 3000);
    expect_hist(4, EV_PKT_START, 12000, 3000);
    expect_hist(5, EV_LLRC_ERR, 12400, 32'h1234_5678);
    expect_hist(6, EV_PKT_END, 20000, 5000);
    expect_hist(7, EV_CONN_END, 20000, 5000);
    rd_reg(REG_STATUS, r);
    check(r[6:1] == 6'b000111, $sformatf("status: done, parity, LLRC (%h)", r));
    rd_reg(REG_WORDS, r);
    check(r == 5000, "word count register");
    rd_reg(REG_HIST_PTR, r);
    check(r == 16, "history pointer register");
    wr_reg(REG_CTRL, 2);
    check(!irq, "interrupt cleared");

    // ---------------- run 2: buffer overrun ----------------
    hist.delete();
    push_ev(EV_CONN_START, 0, 32'hFEED_0002);
    push_words(0, 3000);
    push_ev(EV_CONN_END, 3000, 3000);
    wr_reg(REG_SGT_COUNT, 1);
    wr_reg(REG_CTRL, 1);
    repeat (4000) @(posedge clk);
    check(irq && fifo.size() == 0, "overrun: interrupt, rest discarded");
    expect_hist(1, EV_BUF_OVERRUN, PAGE, 2048);
    expect_hist(2, EV_CONN_END, PAGE, 3000);
    rd_reg(REG_STATUS, r);
    check(r[5] && r[1], "status: overrun and done");
    bad = 0;
    for (int k = 0; k < 2048; k++) if (mem.peek(host_addr(k)) != w_of(k)) bad++;
    check(bad == 0, "overrun: first page written");

    // ---------------- run 3: host bus stalls ----------------
    wr_reg(REG_CTRL, 2);
    mem.stall_pct = 60;
    push_ev(EV_CONN_START, 0, 32'hFEED_0003);
    push_words(100, 4000);
    push_ev(EV_CONN_END, 4000, 4000);
    wr_reg(REG_SGT_COUNT, 4);
    wr_reg(REG_CTRL, 1);
    while (!irq) @(posedge clk);
    bad = 0;
    for (int k = 0; k < 4000; k++) if (mem.peek(host_addr(k)) != w_of(k + 100)) bad++;
    check(bad == 0, "stalled bus: data exact");
    check(mem.stall_cycles > 100, "stalled bus: stalls happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
