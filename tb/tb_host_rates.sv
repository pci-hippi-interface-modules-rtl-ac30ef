// tb_host_rates - workload test: the link throttled by a slow host, at the
// host rates the original boards were measured at. Every parameter is at
// its default.
//
// The measured throughputs of the boards were set by the host: a Destination
// wrote 91, 72 or 65 MByte/s into three different machines, and a Source read
// 20 MByte/s from them. Here each host bus is a token-bucket model that takes
// (or serves) words at exactly such a rate. Four 1 MB connections run in
// turn: Destination host at 91, 72 and 65 MB/s with a fast Source host, then
// Source host at 20 MB/s with a fast Destination host.
//
// Checked for each: every word at its scatter-gather address with its value;
// no overflow, parity or LLRC error in the Destination status; the link rate
// from first to last burst within 3 % of the host rate, so the READY credits
// (Destination) or the whole-burst rule (Source) pace the link without loss;
// and, for the Destination runs, READY held back at least once.
module tb_host_rates;
  import hippi_pkg::*;

  localparam int PAGE   = 8192;
  localparam int WORDS  = 262144;                 // 1 MB per connection
  localparam int NPAGES = WORDS * 4 / PAGE;       // 128
  localparam int D_FULL = 125;                    // MB/s of a word per 32 ns clock
  localparam int S_FULL = 133;                    // MB/s of a word per 30 ns clock

  logic hippi_clk = 0, s_pci_clk = 0, d_pci_clk = 0;
  logic hippi_rst_n = 1, s_pci_rst_n = 1, d_pci_rst_n = 1;
  initial #1 {hippi_rst_n, s_pci_rst_n, d_pci_rst_n} = 3'b000;
  always #20 hippi_clk = ~hippi_clk;     // 25 MHz
  always #15 s_pci_clk = ~s_pci_clk;     // 33 MHz
  always #16 d_pci_clk = ~d_pci_clk;     // ~31 MHz

  logic        s_ht_we = 0, d_ht_we = 0;
  logic [17:0] s_ht_addr = 0, d_ht_addr = 0;
  logic [31:0] s_ht_wdata = 0, d_ht_wdata = 0, s_ht_rdata, d_ht_rdata;
  logic        s_irq, d_irq;
  logic        s_rq_valid, s_rs_valid;
  logic        s_rq_ready = 1'b0;
  logic [31:0] s_rq_addr, s_rs_data;
  logic        d_pm_valid;
  logic        d_pm_ready = 1'b0;
  logic [31:0] d_pm_addr, d_pm_data;

  hippi_pci_link dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] src_word(input logic [31:0] a);
    return a ^ {a[15:0], a[31:16]} ^ 32'h3C3C_A5A5;
  endfunction
  logic [31:0] src_base = 32'h0100_0000;
  function automatic logic [31:0] dst_page(input int i);
    return 32'h4000_0000 + 32'(((i * 37) % NPAGES) * PAGE);
  endfunction

  // ---------------- Source host: read server at s_rate MB/s ----------------
  int s_rate = S_FULL, s_acc = 0;
  longint scyc = 0;
  logic [31:0] rq_q [$];
  longint      due_q [$];
  always @(posedge s_pci_clk) begin
    scyc++;
    s_rs_valid <= 1'b0;
    if (s_rq_valid && s_rq_ready) begin
      rq_q.push_back(s_rq_addr);
      due_q.push_back(scyc + 4);
      s_acc -= S_FULL;
    end
    if (due_q.size() != 0 && due_q[0] <= scyc) begin
      s_rs_valid <= 1'b1;
      s_rs_data  <= src_word(rq_q.pop_front());
      void'(due_q.pop_front());
    end
    s_acc += s_rate;
    if (s_acc > 2 * S_FULL) s_acc = 2 * S_FULL;
    s_rq_ready <= (s_acc >= S_FULL);
  end

  // ---------------- Destination host: write sink at d_rate MB/s ----------------
  int d_rate = D_FULL, d_acc = 0;
  int rx_words = 0, bad = 0;
  always @(posedge d_pci_clk) begin
    if (d_pm_valid && d_pm_ready) begin
      if (d_pm_addr != dst_page(rx_words * 4 / PAGE) + 32'((rx_words * 4) % PAGE) ||
          d_pm_data != src_word(src_base + 32'(4 * rx_words)))
        bad++;
      rx_words++;
      d_acc -= D_FULL;
    end
    d_acc += d_rate;
    if (d_acc > 2 * D_FULL) d_acc = 2 * D_FULL;
    d_pm_ready <= (d_acc >= D_FULL);
  end

  // ---------------- link monitor ----------------
  longint hcyc = 0, first_burst = -1, last_burst = 0, link_words = 0;
  int ready_held = 0;
  logic p_burst = 0;
  always @(posedge hippi_clk) begin
    hcyc++;
    if (dut.burst) begin
      link_words++;
      if (!p_burst && first_burst < 0) first_burst = hcyc;
    end else if (p_burst) last_burst = hcyc;
    p_burst <= dut.burst;
    if (dut.u_dst.u_hctl.connected && !dut.u_dst.u_hctl.ready_ok) ready_held++;
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

  task automatic run(input int d_mbs, input int s_mbs, input int limit, input string tag);
    logic [31:0] r;
    real mbs;
    d_rate = d_mbs; s_rate = s_mbs;
    rx_words = 0; bad = 0; ready_held = 0;
    first_burst = -1; link_words = 0;
    src_base = src_base + 32'h0100_0000;
    for (int i = 0; i < NPAGES; i++) d_wr({RGN_SGTM, 16'(i)}, dst_page(i));
    d_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, NPAGES);
    d_wr({RGN_REGS, 13'd0, REG_CTRL}, 3);             // clear irq, arm
    s_wr({RGN_SGTM, 16'd0}, WORDS);
    s_wr({RGN_SGTM, 16'd2}, src_base);
    s_wr({RGN_SGTM, 16'd3}, {1'b1, 1'b1, 10'd0, 20'(WORDS)});
    s_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, 1);
    s_wr({RGN_REGS, 13'd0, REG_CTRL}, 4);             // clear irq
    s_wr({RGN_REGS, 13'd0, REG_CTRL}, 1);
    while (!(s_irq && d_irq)) @(posedge d_pci_clk);
    repeat (10) @(posedge d_pci_clk);
    check(rx_words == WORDS && link_words == WORDS && bad == 0,
          $sformatf("%s: %0d of %0d words (%0d on the link), %0d wrong", tag, rx_words,
                    WORDS, link_words, bad));
    d_rd({RGN_REGS, 13'd0, REG_STATUS}, r);
    check(r[4:2] == 3'b000, $sformatf("%s: no overflow, LLRC or parity error (%h)", tag, r));
    mbs = real'(link_words) * 4.0 / (real'(last_burst - first_burst + 1) * 40.0e-9) / 1.0e6;
    $display("%s: host %0d MB/s, link %0.1f MB/s, READY held %0d cycles",
             tag, limit, mbs, ready_held);
    check(mbs > 0.97 * real'(limit) && mbs < 1.03 * real'(limit),
          $sformatf("%s: link rate %0.1f within 3%% of %0d MB/s", tag, mbs, limit));
    if (d_mbs < D_FULL) check(ready_held > 0, {tag, ": READY held back by the slow host"});
  endtask

  initial begin
    repeat (5) @(posedge s_pci_clk);
    {hippi_rst_n, s_pci_rst_n, d_pci_rst_n} = 3'b111;
    // host write rate is in MB/s of a 125 MB/s bus, read rate of a 133 MB/s bus
    run(91, S_FULL, 91, "destination into 91 MB/s host");
    run(72, S_FULL, 72, "destination into 72 MB/s host");
    run(65, S_FULL, 65, "destination into 65 MB/s host");
    run(D_FULL, 20, 20, "source from 20 MB/s host");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge hippi_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
