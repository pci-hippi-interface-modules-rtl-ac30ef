// tb_dma_read_engine - checks the Source DMA read engine with modelled SGTM,
// FIFOs and host memory (reads return after 4 clocks, random stalls).
// Run 1: three scatter-gather segments (300, 200 with packet end, 1500 with
// packet and connection end), FIFO drained slowly. Checked: every word in
// order with correct byte parity; the FIFO never holds more than 1024 words;
// the events with their word counts and the I-Field; interrupt only after
// the HIPPI side reports the connection closed.
// Run 2: the memory buffer size (350 words, SGTM word 0) ends the connection inside a
// segment. Run 3: CTRL.abort ends a long transfer that fills the FIFO.
module tb_dma_read_engine;
  import hippi_pkg::*;
  localparam int D = 1024;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #15 clk = ~clk;

  logic        reg_we = 0;
  logic [2:0]  reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic        irq;
  logic [15:0] sgt_addr;
  logic [31:0] sgt_data;
  logic        rq_valid, rq_ready, rs_valid;
  logic [31:0] rq_addr, rs_data;
  logic        fifo_wr_en, ev_wr_en, ev_wr_full = 0;
  logic [35:0] fifo_wr_data;
  logic [10:0] fifo_wr_count;
  hippi_event_t ev_wr_data;
  logic        tgl = 0;
  logic        unused_wr_ready;

  dma_read_engine #(.FIFO_DEPTH(D)) dut (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .irq,
    .sgt_addr, .sgt_data, .rq_valid, .rq_addr, .rq_ready, .rs_valid, .rs_data,
    .fifo_wr_en, .fifo_wr_data, .fifo_wr_count, .ev_wr_en, .ev_wr_data, .ev_wr_full,
    .conn_closed_tgl(tgl));

  host_mem_model mem (.clk, .wr_valid(1'b0), .wr_addr('0), .wr_data('0),
                      .wr_ready(unused_wr_ready), .rq_valid, .rq_addr, .rq_ready,
                      .rs_valid, .rs_data);

  logic [31:0]  sgt [int];
  logic [35:0]  fifo [$];
  hippi_event_t evq [$];
  logic [35:0]  got [$];
  int           drain_pct = 0, max_fill = 0, overflow = 0;
  always @(negedge clk) fifo_wr_count = 11'(fifo.size());
  always @(posedge clk) begin
    sgt_data <= sgt.exists(int'(sgt_addr)) ? sgt[int'(sgt_addr)] : '0;
    if (fifo.size() != 0 && $urandom_range(99) < drain_pct) got.push_back(fifo.pop_front());
    if (fifo_wr_en) begin
      if (fifo.size() >= D) overflow++;
      else fifo.push_back(fifo_wr_data);
    end
    if (fifo.size() > max_fill) max_fill = fifo.size();
    if (ev_wr_en) evq.push_back(ev_wr_data);
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

  task automatic seg(input int e, input logic [31:0] a, input int n, input bit pe, input bit ce);
    sgt[2*e+2] = a;
    sgt[2*e+3] = {ce, pe, 10'd0, 20'(n)};
  endtask

  task automatic expect_event(input ev_kind_e k, input int idx, input logic [31:0] pl,
                              input string what);
    check(evq.size() != 0 && evq[0].kind == k && evq[0].index == 32'(idx) &&
          evq[0].payload == pl,
          $sformatf("%s: want %s at %0d", what, k.name(), idx));
    if (evq.size() != 0) void'(evq.pop_front());
  endtask

  logic [31:0] exp_addr [$];
  task automatic check_stream(input string what);
    int bad = 0;
    while (fifo.size() != 0) got.push_back(fifo.pop_front());
    for (int i = 0; i < exp_addr.size(); i++) begin
      logic [31:0] w;
      w = mem.peek(exp_addr[i]);
      if (i >= got.size() || got[i] != {byte_parity(w), w}) bad++;
    end
    check(bad == 0 && got.size() == exp_addr.size(),
          $sformatf("%s: %0d words, %0d wrong (want %0d)", what, got.size(), bad, exp_addr.size()));
    got.delete();
    exp_addr.delete();
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- run 1 ----------------
    mem.stall_pct = 30;
    drain_pct = 20;
    seg(0, 32'h0010_0000, 300, 0, 0);
    seg(1, 32'h0020_0000, 200, 1, 0);
    seg(2, 32'h0030_0000, 1500, 1, 1);
    for (int i = 0; i < 300; i++)  exp_addr.push_back(32'h0010_0000 + 4*i);
    for (int i = 0; i < 200; i++)  exp_addr.push_back(32'h0020_0000 + 4*i);
    for (int i = 0; i < 1500; i++) exp_addr.push_back(32'h0030_0000 + 4*i);
    wr_reg(REG_IFIELD, 32'h0BAD_CAFE);
    wr_reg(REG_SGT_COUNT, 3);
    sgt[0] = 100000;       // memory buffer size
    wr_reg(REG_CTRL, 1);
    repeat (13000) @(posedge clk);
    check(!irq, "no interrupt before HIPPI side closes");
    rd_reg(REG_WORDS, r);
    check(r == 2000, $sformatf("2000 words queued (%0d)", r));
    check_stream("run 1");
    check(max_fill <= D && overflow == 0, $sformatf("FIFO never overfilled (max %0d)", max_fill));
    check(max_fill > D - 64, "FIFO was filled (slow drain)");
    expect_event(EV_CONN_START, 0, 32'h0BAD_CAFE, "run 1");
    expect_event(EV_PKT_END, 500, 500, "run 1");
    expect_event(EV_PKT_END, 2000, 2000, "run 1");
    expect_event(EV_CONN_END, 2000, 2000, "run 1");
    check(evq.size() == 0, "run 1: no extra events");
    tgl = ~tgl;
    repeat (5) @(posedge clk);
    check(irq, "interrupt after connection closed");
    rd_reg(REG_STATUS, r);
    check(r[2:0] == 3'b010, $sformatf("status done (%h)", r));
    wr_reg(REG_CTRL, 4);
    check(!irq, "interrupt cleared");

    // ---------------- run 2: buffer size ----------------
    mem.stall_pct = 0;
    drain_pct = 100;
    seg(0, 32'h0040_0000, 300, 0, 0);
    seg(1, 32'h0050_0000, 200, 1, 1);
    for (int i = 0; i < 300; i++) exp_addr.push_back(32'h0040_0000 + 4*i);
    for (int i = 0; i < 50; i++)  exp_addr.push_back(32'h0050_0000 + 4*i);
    wr_reg(REG_SGT_COUNT, 2);
    sgt[0] = 350;          // memory buffer size
    wr_reg(REG_CTRL, 1);
    repeat (1500) @(posedge clk);
    rd_reg(REG_BUF_WORDS, r);
    check(r == 350, "run 2: buffer size loaded from SGTM word 0");
    check_stream("run 2");
    expect_event(EV_CONN_START, 0, 32'h0BAD_CAFE, "run 2");
    expect_event(EV_PKT_END, 350, 350, "run 2");
    expect_event(EV_CONN_END, 350, 350, "run 2");
    tgl = ~tgl;
    repeat (5) @(posedge clk);
    check(irq, "run 2: interrupt");
    wr_reg(REG_CTRL, 4);

    // ---------------- run 3: abort ----------------
    drain_pct = 0;
    seg(0, 32'h0060_0000, 100000, 1, 1);
    wr_reg(REG_SGT_COUNT, 1);
    sgt[0] = 1000000;      // memory buffer size
    wr_reg(REG_CTRL, 1);
    repeat (2000) @(posedge clk);
    check(fifo.size() == D, "run 3: FIFO full, engine waiting");
    for (int i = 0; i < D; i++) exp_addr.push_back(32'h0060_0000 + 4*i);
    wr_reg(REG_CTRL, 2);
    repeat (50) @(posedge clk);
    check_stream("run 3");
    expect_event(EV_CONN_START, 0, 32'h0BAD_CAFE, "run 3");
    expect_event(EV_PKT_END, D, D, "run 3");
    expect_event(EV_CONN_END, D, D, "run 3");
    tgl = ~tgl;
    repeat (5) @(posedge clk);
    rd_reg(REG_STATUS, r);
    check(irq && r[2:0] == 3'b110, $sformatf("run 3: aborted and done (%h)", r));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
