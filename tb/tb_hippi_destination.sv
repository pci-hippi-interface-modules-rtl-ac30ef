// tb_hippi_destination - checks the Destination board at its default sizes,
// driven by a behavioural HIPPI source and writing into modelled host
// memory, with the PCI and HIPPI clocks unrelated.
// The host fills the SGTM (pages in scrambled order) and arms the board over
// the pass-through port. The source then sends a connection of two packets
// (2500 words with one bad-parity word, 700 words whose second burst
// carries a bad LLRC). Checked:
// every word at its scatter-gather address, the history records read back
// over the host port, the status and count registers, and the interrupt.
module tb_hippi_destination;
  import hippi_pkg::*;
  localparam int PAGE = 8192;

  logic pci_clk = 0, hippi_clk = 0, pci_rst_n = 1, hippi_rst_n = 1;
  initial #1 {pci_rst_n, hippi_rst_n} = 2'b00;
  always #15 pci_clk = ~pci_clk;
  always #20 hippi_clk = ~hippi_clk;

  logic        h_request, h_connect, h_ready, h_packet, h_burst;
  logic [31:0] h_data;
  logic [3:0]  h_parity;
  logic        ht_we = 0;
  logic [17:0] ht_addr = 0;
  logic [31:0] ht_wdata = 0, ht_rdata;
  logic        irq, pm_valid, pm_ready;
  logic [31:0] pm_addr, pm_data;
  logic        unused_rq_ready, unused_rs_valid;
  logic [31:0] unused_rs_data;

  hippi_destination dut (.*);

  hippi_tx_model tx (.clk(hippi_clk), .request(h_request), .connect(h_connect),
                     .data(h_data), .parity(h_parity), .ready(h_ready),
                     .packet(h_packet), .burst(h_burst));

  host_mem_model mem (.clk(pci_clk), .wr_valid(pm_valid), .wr_addr(pm_addr),
                      .wr_data(pm_data), .wr_ready(pm_ready), .rq_valid(1'b0),
                      .rq_addr('0), .rq_ready(unused_rq_ready),
                      .rs_valid(unused_rs_valid), .rs_data(unused_rs_data));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ht_wr(input logic [17:0] a, input logic [31:0] d);
    @(posedge pci_clk); ht_we <= 1; ht_addr <= a; ht_wdata <= d;
    @(posedge pci_clk); ht_we <= 0;
  endtask
  task automatic ht_rd(input logic [17:0] a, output logic [31:0] d);
    @(posedge pci_clk); ht_addr <= a;
    @(posedge pci_clk); @(posedge pci_clk); #1 d = ht_rdata;
  endtask

  int page_map [4] = '{3, 0, 2, 1};
  function automatic logic [31:0] host_addr(input int k);
    return 32'h4000_0000 + 32'(page_map[(k * 4) / PAGE] * PAGE + (k * 4) % PAGE);
  endfunction
  // word k of the connection
  function automatic logic [31:0] w_of(input int k);
    return (k < 2500) ? tx.word_of(1, k) : tx.word_of(2, k - 2500);
  endfunction

  task automatic expect_hist(input int i, input ev_kind_e kd, input int off,
                             input logic [31:0] pl);
    logic [31:0] w0, w1;
    ht_rd({RGN_HIST, 16'(2*i)}, w0);
    ht_rd({RGN_HIST, 16'(2*i+1)}, w1);
    check(w0 == {kd, 28'(off)} && w1 == pl,
          $sformatf("history %0d = %h %h, want %0d/%0d/%h", i, w0, w1, kd, off, pl));
  endtask

  initial begin
    logic [31:0] r;
    int bad;
    repeat (4) @(posedge pci_clk);
    {pci_rst_n, hippi_rst_n} = 2'b11;
    mem.stall_pct = 30;
    for (int i = 0; i < 4; i++) ht_wr({RGN_SGTM, 16'(i)}, 32'h4000_0000 + 32'(page_map[i] * PAGE));
    ht_rd({RGN_SGTM, 16'd2}, r);
    check(r == 32'h4000_0000 + 32'(2 * PAGE), "SGTM readable over host port");
    ht_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, 4);
    ht_wr({RGN_REGS, 13'd0, REG_CTRL}, 1);
    tx.open_conn(32'h0000_ABCD);
    tx.send_packet(2500, 1, 777);
    tx.send_packet(700, 2, -1, 1);
    tx.close_conn();
    begin
      automatic int t = 0;
      while (!irq && t < 20000) begin @(posedge pci_clk); t++; end
    end
    check(irq, "interrupt at connection end");
    bad = 0;
    for (int k = 0; k < 3200; k++) if (mem.peek(host_addr(k)) != w_of(k)) bad++;
    check(bad == 0, $sformatf("3200 words at scatter-gather addresses (%0d wrong)", bad));
    expect_hist(0, EV_CONN_START, 0, 32'h0000_ABCD);
    expect_hist(1, EV_PKT_START, 0, 0);
    expect_hist(2, EV_PARITY_ERR, 777 * 4, host_addr(777));
    expect_hist(3, EV_PKT_END, 10000, 2500);
    expect_hist(4, EV_PKT_START, 10000, 2500);
    expect_hist(5, EV_LLRC_ERR, 4 * (2500 + 512), check_llrc(2, 256, 256) ^ 32'h1);
    expect_hist(6, EV_PKT_END, 12800, 3200);
    expect_hist(7, EV_CONN_END, 12800, 3200);
    ht_rd({RGN_REGS, 13'd0, REG_STATUS}, r);
    check(r[6:1] == 6'b000111, $sformatf("status: done, parity, LLRC (%h)", r));
    ht_rd({RGN_REGS, 13'd0, REG_WORDS}, r);
    check(r == 3200, "word count");
    check(tx.readies >= tx.bursts, "a READY for every burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LLRC the source computes for burst of `len` words starting at packet word `from`
  function automatic logic [31:0] check_llrc(input int seed, input int from, input int len);
    logic [31:0] acc = 0;
    for (int i = from; i < from + len; i++) acc ^= tx.word_of(seed, i);
    return acc ^ 32'(len);
  endfunction

  initial begin
    repeat (200000) @(posedge hippi_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
