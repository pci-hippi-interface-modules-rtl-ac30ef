// tb_hippi_source - checks the Source board at its default sizes, reading
// modelled host memory (4-clock read latency, random stalls) and sending to a
// behavioural HIPPI destination, with the PCI and HIPPI clocks unrelated.
// The host writes the scatter-gather table (buffer size in word 0, then
// three segments: 700 words, 1300 words ending packet 1, 600 words ending
// packet 2 and the connection) and the I-Field over the pass-through port,
// then starts the board.
// Checked: SGTM read-back; the I-Field seen with REQUEST; all 2600 words in
// order with correct parity and LLRC; bursts of 256 with short bursts only
// at packet ends; PACKET framing; the interrupt after the connection closes;
// the status and word-count registers.
module tb_hippi_source;
  import hippi_pkg::*;

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
  logic        irq, rq_valid, rq_ready, rs_valid;
  logic [31:0] rq_addr, rs_data;
  logic        unused_wr_ready;

  hippi_source dut (.*);

  hippi_rx_model rx (.clk(hippi_clk), .request(h_request), .connect(h_connect),
                     .data(h_data), .parity(h_parity), .ready(h_ready),
                     .packet(h_packet), .burst(h_burst));

  host_mem_model mem (.clk(pci_clk), .wr_valid(1'b0), .wr_addr('0), .wr_data('0),
                      .wr_ready(unused_wr_ready), .rq_valid, .rq_addr, .rq_ready,
                      .rs_valid, .rs_data);

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
  task automatic seg(input int e, input logic [31:0] a, input int n, input bit pe, input bit ce);
    ht_wr({RGN_SGTM, 16'(2*e+2)}, a);
    ht_wr({RGN_SGTM, 16'(2*e+3)}, {ce, pe, 10'd0, 20'(n)});
  endtask

  initial begin
    logic [31:0] r;
    logic [31:0] exp_w [$];
    int bad;
    bit lens_ok;
    repeat (4) @(posedge pci_clk);
    {pci_rst_n, hippi_rst_n} = 2'b11;
    mem.stall_pct = 25;
    seg(0, 32'h0100_0000, 700, 0, 0);
    seg(1, 32'h0200_0000, 1300, 1, 0);
    seg(2, 32'h0300_0000, 600, 1, 1);
    for (int i = 0; i < 700; i++)  exp_w.push_back(mem.pattern(32'h0100_0000 + 4*i));
    for (int i = 0; i < 1300; i++) exp_w.push_back(mem.pattern(32'h0200_0000 + 4*i));
    for (int i = 0; i < 600; i++)  exp_w.push_back(mem.pattern(32'h0300_0000 + 4*i));
    ht_rd({RGN_SGTM, 16'd5}, r);
    check(r == {1'b0, 1'b1, 10'd0, 20'd1300}, "SGTM readable over host port");
    ht_wr({RGN_REGS, 13'd0, REG_IFIELD}, 32'h0513_0042);
    ht_wr({RGN_REGS, 13'd0, REG_SGT_COUNT}, 3);
    ht_wr({RGN_SGTM, 16'd0}, 1 << 20);     // memory buffer size
    ht_wr({RGN_REGS, 13'd0, REG_CTRL}, 1);
    begin
      automatic int t = 0;
      while (!irq && t < 40000) begin @(posedge pci_clk); t++; end
    end
    check(irq, "interrupt after the connection closed");
    check(!h_request && !h_connect, "connection closed");
    check(rx.ifield == 32'h0513_0042, "I-Field with REQUEST");
    check(rx.conns == 1 && rx.conn_ends == 1, "one connection");
    check(rx.words.size() == 2600, $sformatf("2600 words sent (%0d)", rx.words.size()));
    bad = 0;
    foreach (exp_w[i]) if (i >= rx.words.size() || rx.words[i] != exp_w[i]) bad++;
    check(bad == 0, $sformatf("words in order (%0d wrong)", bad));
    check(rx.par_err == 0 && rx.llrc_err == 0, "parity and LLRC correct");
    check(rx.pkt_end_at.size() == 2 && rx.pkt_end_at[0] == 2000 && rx.pkt_end_at[1] == 2600,
          "packet ends after words 2000 and 2600");
    // packet 1 = 7 x 256 + 208, packet 2 = 2 x 256 + 88
    lens_ok = rx.burst_len.size() == 11;
    for (int i = 0; i < rx.burst_len.size() && lens_ok; i++)
      lens_ok = rx.burst_len[i] == ((i == 7) ? 208 : (i == 10) ? 88 : 256);
    check(lens_ok, "bursts of 256, short only at packet ends");
    ht_rd({RGN_REGS, 13'd0, REG_STATUS}, r);
    check(r[2:0] == 3'b010, $sformatf("status done (%h)", r));
    ht_rd({RGN_REGS, 13'd0, REG_WORDS}, r);
    check(r == 2600, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge hippi_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
