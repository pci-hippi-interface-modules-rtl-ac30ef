// tb_hippi_pci_link - end-to-end test of a Source board sending HIPPI
// connections to a Destination board, every parameter at its default.
//
// Connection 1: four scatter-gather segments forming three packets
// (800, 4000 and 50 words), with both PCI buses stalling at random so the
// destination FIFO fills and READY is held back. The receive buffer is
// scattered over pages in reverse order. Checked: every word in the right
// place of destination host memory, the history records (I-Field, packet
// ends, connection end), status and word count registers, both interrupts.
// Connection 2: the source buffer size (700 words) stops the transfer in the
// middle of a segment. Connection 3: no stalls; the link rate is measured
// and must reach 95 MByte/s (the HIPPI-32 ceiling is 100 MByte/s).
// Each mechanism (full and short bursts, page switch, PCI write stall,
// READY held back, buffer-size stop) must have happened at least once.
module tb_hippi_pci_link;
  import hippi_pkg::*;

  localparam int PAGE = 8192;

  logic hippi_clk = 0, s_pci_clk = 0, d_pci_clk = 0;
  logic hippi_rst_n = 1, s_pci_rst_n = 1, d_pci_rst_n = 1;
  initial #1 {hippi_rst_n, s_pci_rst_n, d_pci_rst_n} = 3'b000;
  always #20   hippi_clk = ~hippi_clk;   // 25 MHz
  always #15   s_pci_clk     = ~s_pci_clk;       // 33 MHz
  always #16   d_pci_clk     = ~d_pci_clk;       // ~32 MHz, unrelated phase

  logic        s_ht_we = 0, d_ht_we = 0;
  logic [17:0] s_ht_addr = 0, d_ht_addr = 0;
  logic [31:0] s_ht_wdata = 0, d_ht_wdata = 0, s_ht_rdata, d_ht_rdata;
  logic        s_irq, d_irq;
  logic        s_rq_valid, s_rq_ready, s_rs_valid;
  logic [31:0] s_rq_addr, s_rs_data;
  logic        d_pm_valid, d_pm_ready;
  logic [31:0] d_pm_addr, d_pm_data;
  logic        unused_wr_ready, unused_rq_ready, unused_rs_valid;
  logic [31:0] unused_rs_data;

  hippi_pci_link dut (.*);

  host_mem_model s_mem (.clk(s_pci_clk), .wr_valid(1'b0), .wr_addr('0), .wr_data('0),
                        .wr_ready(unused_wr_ready),
                        .rq_valid(s_rq_valid), .rq_addr(s_rq_addr), .rq_ready(s_rq_ready),
                        .rs_valid(s_rs_valid), .rs_data(s_rs_data));
  host_mem_model d_mem (.clk(d_pci_clk), .wr_valid(d_pm_valid), .wr_addr(d_pm_addr),
                        .wr_data(d_pm_data), .wr_ready(d_pm_ready),
                        .rq_valid(1'b0), .rq_addr('0), .rq_ready(unused_rq_ready),
                        .rs_valid(unused_rs_valid), .rs_data(unused_rs_data));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- link monitor ----------------
  int  full_bursts = 0, short_bursts = 0, ready_held = 0, page_switches = 0;
  int  blen = 0;
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
    if (dut.u_dst.u_hctl.connected && !dut.u_dst.u_hctl.ready_ok) ready_held++;
  end
  always @(posedge d_pci_clk)
    if (dut.u_dst.u_dma.state == dut.u_dst.u_dma.S_SGT) page_switches++;

  // ---------------- host port helpers ----------------
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

  function automatic logic [17:0] sg(input int w);
    return {RGN_SGTM, 16'(w)};
  endfunction
  function automatic logic [17:0] hist(input int w);
    return {RGN_HIST, 16'(w)};
  endfunction

  localparam int NPAGES = 8;
  function automatic logic [31:0] dst_page(input int i);
    return 32'h1000_0000 + 32'((NPAGES - 1 - i) * PAGE);   // reverse order
  endfunction

  // expected stream: list of source word addresses in order
  logic [31:0] exp_addr [$];

  task automatic add_seg(input int e, input logic [31:0] a, input int n,
                         input bit pe, input bit ce);
    s_wr(sg(2*e+2), a);
    s_wr(sg(2*e+3), {ce, pe, 10'd0, 20'(n)});
  endtask

  task automatic arm_dst();
    for (int i = 0; i < NPAGES; i++) d_wr(sg(i), dst_page(i));
    d_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, NPAGES);
    d_wr({RGN_REGS, 13'd0, REG_CTRL}, 32'h3);   // clear irq, arm
  endtask

  task automatic wait_both_irq(input string tag);
    int t = 0;
    while (!(s_irq && d_irq) && t < 400000) begin @(posedge d_pci_clk); t++; end
    check(s_irq && d_irq, {tag, ": both interrupts raised"});
  endtask

  task automatic check_data(input int n, input string tag);
    int bad = 0;
    for (int k = 0; k < n; k++) begin
      logic [31:0] pa;
      pa = dst_page(k * 4 / PAGE) + 32'((k * 4) % PAGE);
      if (d_mem.peek(pa) != s_mem.peek(exp_addr[k])) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d of %0d words wrong", tag, bad, n));
  endtask

  task automatic check_hist(input int idx, input ev_kind_e k, input logic [31:0] pl,
                            input string tag);
    logic [31:0] w0, w1;
    d_rd(hist(2*idx), w0);
    d_rd(hist(2*idx+1), w1);
    check(w0[31:28] == k && w1 == pl,
          $sformatf("%s: history %0d = %h/%h, want kind %0d payload %h", tag, idx, w0, w1, k, pl));
  endtask

  initial begin
    logic [31:0] r;
    int buffer_stop;
    buffer_stop = 0;
    #200;
    hippi_rst_n = 1; s_pci_rst_n = 1; d_pci_rst_n = 1;

    // ---------------- connection 1 ----------------
    s_mem.stall_pct = 20;
    d_mem.stall_pct = 75;
    arm_dst();
    add_seg(0, 32'h0010_0000, 300, 0, 0);
    add_seg(1, 32'h0020_0000, 500, 1, 0);
    add_seg(2, 32'h0030_0000, 4000, 1, 0);
    add_seg(3, 32'h0040_0000, 50, 1, 1);
    for (int i = 0; i < 300; i++)  exp_addr.push_back(32'h0010_0000 + 4*i);
    for (int i = 0; i < 500; i++)  exp_addr.push_back(32'h0020_0000 + 4*i);
    for (int i = 0; i < 4000; i++) exp_addr.push_back(32'h0030_0000 + 4*i);
    for (int i = 0; i < 50; i++)   exp_addr.push_back(32'h0040_0000 + 4*i);
    s_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, 4);
    s_wr(sg(0), 1_000_000);   // memory buffer size
    s_wr({RGN_REGS, 13'd0, REG_IFIELD}, 32'h0012_3456);
    s_wr({RGN_REGS, 13'd0, REG_CTRL}, 32'h1);
    wait_both_irq("conn1");
    check_data(4850, "conn1");
    check_hist(0, EV_CONN_START, 32'h0012_3456, "conn1");
    check_hist(1, EV_PKT_START, 0, "conn1");
    check_hist(2, EV_PKT_END, 800, "conn1");
    check_hist(3, EV_PKT_START, 800, "conn1");
    check_hist(4, EV_PKT_END, 4800, "conn1");
    check_hist(5, EV_PKT_START, 4800, "conn1");
    check_hist(6, EV_PKT_END, 4850, "conn1");
    check_hist(7, EV_CONN_END, 4850, "conn1");
    d_rd({RGN_REGS, 13'd0, REG_STATUS}, r);
    check(r[6:1] == 6'b000001, $sformatf("conn1: dst status %h", r));
    d_rd({RGN_REGS, 13'd0, REG_WORDS}, r);
    check(r == 4850, "conn1: dst word count");
    d_rd({RGN_REGS, 13'd0, REG_HIST_PTR}, r);
    check(r == 16, "conn1: history length");
    check(d_mem.stall_cycles > 0, "conn1: PCI write stalls happened");

    // ---------------- connection 2: buffer size stop ----------------
    s_mem.stall_pct = 0;
    d_mem.stall_pct = 0;
    exp_addr.delete();
    arm_dst();
    s_wr({RGN_REGS, 13'd0, REG_CTRL}, 32'h4);
    add_seg(0, 32'h0050_0000, 1000, 1, 1);
    for (int i = 0; i < 700; i++) exp_addr.push_back(32'h0050_0000 + 4*i);
    s_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, 1);
    s_wr(sg(0), 700);   // memory buffer size
    s_wr({RGN_REGS, 13'd0, REG_CTRL}, 32'h1);
    wait_both_irq("conn2");
    check_data(700, "conn2");
    check_hist(2, EV_PKT_END, 700, "conn2");
    check_hist(3, EV_CONN_END, 700, "conn2");
    d_rd({RGN_REGS, 13'd0, REG_WORDS}, r);
    if (r == 700) buffer_stop++;
    check(r == 700, "conn2: transfer stopped at the buffer size");

    // ---------------- connection 3: throughput ----------------
    exp_addr.delete();
    arm_dst();
    s_wr({RGN_REGS, 13'd0, REG_CTRL}, 32'h4);
    add_seg(0, 32'h0060_0000, 8192, 1, 1);
    for (int i = 0; i < 8192; i++) exp_addr.push_back(32'h0060_0000 + 4*i);
    s_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, 1);
    s_wr(sg(0), 8192);   // memory buffer size
    first_burst = -1;
    link_words = 0;
    s_wr({RGN_REGS, 13'd0, REG_CTRL}, 32'h1);
    wait_both_irq("conn3");
    check_data(8192, "conn3");
    begin
      real mbs;
      mbs = real'(link_words) * 4.0 / (real'(last_burst - first_burst + 1) * 40.0e-9) / 1.0e6;
      $display("conn3: %0d words in %0d HIPPI cycles = %0.1f MByte/s",
               link_words, last_burst - first_burst + 1, mbs);
      check(mbs >= 95.0 && mbs <= 100.0, "conn3: link rate between 95 and 100 MByte/s");
    end

    // ---------------- mechanisms ----------------
    $display("full bursts %0d, short bursts %0d, page switches %0d, ready held %0d cycles, write stalls %0d, buffer stops %0d",
             full_bursts, short_bursts, page_switches, ready_held, d_mem.stall_cycles, buffer_stop);
    check(full_bursts > 0,   "mechanism: full 256-word burst");
    check(short_bursts > 0,  "mechanism: short last burst");
    check(page_switches > 1, "mechanism: scatter-gather page switch");
    check(ready_held > 0,    "mechanism: READY held back by full FIFO");
    check(d_mem.stall_cycles > 0, "mechanism: PCI write stall");
    check(buffer_stop > 0,   "mechanism: buffer-size stop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge hippi_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
