// tb_na48_block - workload test: one large data block sent from one host to
// another as a single HIPPI connection, the way an event-building farm ships
// blocks of ~180 MB to whichever workstation is free. Every parameter is at
// its default.
//
// The block is 180 MB (47,185,920 words). The Source reads it from ninety
// 2 MB segments of its host memory. The Destination scatters it over 23040
// pages of 8 kB, placed in a permuted order. The destination host bus never
// stalls, and the received words are checked on the fly against the source
// pattern and the scatter-gather address, so no host memory is stored.
//
// Checked: every word at its expected host address with its expected value;
// 184320 full bursts and no short one; one scatter-gather lookup per page;
// the four history records and the word count; both interrupts; and the
// sustained link rate over the whole block (at least 98 MByte/s).
// The block uses 23040 of the 65536 destination table entries and 90 of the
// 32767 source segments. It runs for about two minutes of simulation.
module tb_na48_block;
  import hippi_pkg::*;

  localparam int PAGE   = 8192;
  localparam int SEG_W  = 524_288;                   // words per source segment (2 MB)
  localparam int NSEG   = 90;
  localparam int TOTAL  = SEG_W * NSEG;              // 180 MB
  localparam int NPAGES = (TOTAL * 4 + PAGE - 1) / PAGE;

  logic hippi_clk = 0, s_pci_clk = 0, d_pci_clk = 0;
  logic hippi_rst_n = 1, s_pci_rst_n = 1, d_pci_rst_n = 1;
  initial #1 {hippi_rst_n, s_pci_rst_n, d_pci_rst_n} = 3'b000;
  always #20 hippi_clk = ~hippi_clk;     // 25 MHz
  always #15 s_pci_clk = ~s_pci_clk;     // 33 MHz
  always #16 d_pci_clk = ~d_pci_clk;     // ~32 MHz

  logic        s_ht_we = 0, d_ht_we = 0;
  logic [17:0] s_ht_addr = 0, d_ht_addr = 0;
  logic [31:0] s_ht_wdata = 0, d_ht_wdata = 0, s_ht_rdata, d_ht_rdata;
  logic        s_irq, d_irq;
  logic        s_rq_valid, s_rq_ready, s_rs_valid;
  logic [31:0] s_rq_addr, s_rs_data;
  logic        d_pm_valid;
  logic        d_pm_ready = 1'b1;
  logic [31:0] d_pm_addr, d_pm_data;
  logic        unused_wr_ready;

  hippi_pci_link dut (.*);

  host_mem_model s_mem (.clk(s_pci_clk), .wr_valid(1'b0), .wr_addr('0), .wr_data('0),
                        .wr_ready(unused_wr_ready),
                        .rq_valid(s_rq_valid), .rq_addr(s_rq_addr), .rq_ready(s_rq_ready),
                        .rs_valid(s_rs_valid), .rs_data(s_rs_data));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] src_addr(input int k);
    return 32'h0100_0000 * 32'(k / SEG_W + 1) + 32'(4 * (k % SEG_W));
  endfunction
  // page i lands at physical page (i * 769) mod 32768: a permutation
  function automatic logic [31:0] dst_page(input int i);
    return 32'h2000_0000 + 32'(((i * 769) % 32768) * PAGE);
  endfunction
  function automatic logic [31:0] dst_addr(input int k);
    return dst_page(k * 4 / PAGE) + 32'((k * 4) % PAGE);
  endfunction

  // ---------------- destination host bus: streaming checker ----------------
  int rx_words = 0, bad_addr = 0, bad_data = 0;
  always @(posedge d_pci_clk)
    if (d_pm_valid && d_pm_ready) begin
      if (d_pm_addr != dst_addr(rx_words)) bad_addr++;
      if (d_pm_data != s_mem.pattern(src_addr(rx_words))) bad_data++;
      rx_words++;
    end

  // ---------------- link monitor ----------------
  int full_bursts = 0, short_bursts = 0, blen = 0, page_lookups = 0;
  longint hcyc = 0, first_burst = -1, last_burst = 0, link_words = 0;
  logic p_burst = 0;
  always @(posedge hippi_clk) begin
    hcyc++;
    if (dut.burst) begin
      blen++;
      link_words++;
      if (!p_burst && first_burst < 0) first_burst = hcyc;
    end else if (p_burst) begin
      if (blen == 256) full_bursts++; else short_bursts++;
      last_burst = hcyc;
      blen = 0;
    end
    p_burst <= dut.burst;
  end
  logic p_sgt = 0;
  always @(posedge d_pci_clk) begin
    if (dut.u_dst.u_dma.state == dut.u_dst.u_dma.S_SGT && !p_sgt) page_lookups++;
    p_sgt <= (dut.u_dst.u_dma.state == dut.u_dst.u_dma.S_SGT);
  end

  task automatic s_wr(input logic [17:0] a, input logic [31:0] d);
    @(posedge s_pci_clk); s_ht_we <= 1; s_ht_addr <= a; s_ht_wdata <= d;
    @(posedge s_pci_clk); s_ht_we <= 0;
  endtask
  task automatic d_wr(input logic [17:0] a, input logic [31:0] d);
    @(posedge d_pci_clk); d_ht_we <= 1; d_ht_addr <= a; d_ht_wdata <= d;
    @(posedge d_pci_clk); d_ht_we <= 0;
  endtask
  task automatic d_rd(input logic [17:0] a, output logic [31:0] d);
    @(posedge d_pci_clk); d_ht_addr <= a;
    @(posedge d_pci_clk); @(posedge d_pci_clk); #1 d = d_ht_rdata;
  endtask
  task automatic check_hist(input int i, input ev_kind_e k, input int off, input logic [31:0] pl);
    logic [31:0] w0, w1;
    d_rd({RGN_HIST, 16'(2*i)}, w0);
    d_rd({RGN_HIST, 16'(2*i+1)}, w1);
    check(w0 == {k, 28'(off)} && w1 == pl,
          $sformatf("history %0d = %h/%h, want kind %0d offset %0d payload %h", i, w0, w1, k, off, pl));
  endtask

  initial begin
    logic [31:0] r;
    repeat (5) @(posedge s_pci_clk);
    {hippi_rst_n, s_pci_rst_n, d_pci_rst_n} = 3'b111;
    // Destination: receive buffer of NPAGES scattered pages
    for (int i = 0; i < NPAGES; i++) d_wr({RGN_SGTM, 16'(i)}, dst_page(i));
    d_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, NPAGES);
    d_wr({RGN_REGS, 13'd0, REG_CTRL}, 1);
    // Source: buffer size, ninety segments, one packet, one connection
    s_wr({RGN_SGTM, 16'd0}, TOTAL);
    for (int e = 0; e < NSEG; e++) begin
      s_wr({RGN_SGTM, 16'(2*e+2)}, src_addr(e * SEG_W));
      s_wr({RGN_SGTM, 16'(2*e+3)}, {e == NSEG - 1, e == NSEG - 1, 10'd0, 20'(SEG_W)});
    end
    s_wr({RGN_REGS, 13'd0, REG_IFIELD}, 32'h0048_0001);
    s_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, NSEG);
    s_wr({RGN_REGS, 13'd0, REG_CTRL}, 1);
    while (!(s_irq && d_irq)) @(posedge d_pci_clk);
    repeat (10) @(posedge d_pci_clk);

    check(rx_words == TOTAL, $sformatf("%0d of %0d words written to the host", rx_words, TOTAL));
    check(bad_addr == 0 && bad_data == 0,
          $sformatf("every word at its address (%0d wrong) with its value (%0d wrong)", bad_addr, bad_data));
    check(full_bursts == TOTAL / 256 && short_bursts == 0,
          $sformatf("%0d full bursts, %0d short", full_bursts, short_bursts));
    check(page_lookups >= NPAGES - 1 && page_lookups <= NPAGES,
          $sformatf("%0d scatter-gather page lookups for %0d pages", page_lookups, NPAGES));
    check_hist(0, EV_CONN_START, 0, 32'h0048_0001);
    check_hist(1, EV_PKT_START, 0, 0);
    check_hist(2, EV_PKT_END, TOTAL * 4, TOTAL);
    check_hist(3, EV_CONN_END, TOTAL * 4, TOTAL);
    d_rd({RGN_REGS, 13'd0, REG_WORDS}, r);
    check(r == TOTAL, "destination word count");
    d_rd({RGN_REGS, 13'd0, REG_HIST_PTR}, r);
    check(r == 8, "four history records");
    begin
      real mbs;
      mbs = real'(link_words) * 4.0 / (real'(last_burst - first_burst + 1) * 40.0e-9) / 1.0e6;
      $display("%0d words in %0d HIPPI cycles = %0.2f MByte/s", link_words,
               last_burst - first_burst + 1, mbs);
      check(mbs >= 98.0 && mbs <= 100.0, "sustained link rate at least 98 MByte/s");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000_000) @(posedge hippi_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
