// tb_async_fifo - checks the dual-clock FIFO at its default 1k x 36 size.
// Phase 1 fills it from empty with the reader stopped: wr_full must rise after
// exactly 1024 words and further writes must be ignored; the reader must
// then see rd_count reach 1024. Phase 2 drains it. Phase 3 runs random
// writes and reads on unrelated clocks against a reference queue. Every
// popped word is compared with the reference, in order.
module tb_async_fifo;
  localparam int W = 36, D = 1024;

  logic wclk = 0, rclk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  logic          wr_en = 0, rd_en = 0, wr_full, rd_empty;
  logic [W-1:0]  wr_data = 0, rd_data;
  logic [$clog2(D):0] wr_count, rd_count;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst_n(rst_n), .wr_en, .wr_data, .wr_full, .wr_count,
    .rd_clk(rclk), .rd_rst_n(rst_n), .rd_en, .rd_data, .rd_empty, .rd_count);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] refq [$];
  int pop_bad = 0, pops = 0;
  bit random_phase = 0;

  // writer
  task automatic push(input logic [W-1:0] d);
    @(posedge wclk);
    wr_en <= 1; wr_data <= d;
    if (!wr_full) refq.push_back(d);
    @(posedge wclk);
    wr_en <= 0;
  endtask

  // reader: checks each accepted pop
  always @(posedge rclk) begin
    if (rd_en && !rd_empty) begin
      pops++;
      if (refq.size() == 0 || rd_data != refq[0]) pop_bad++;
      if (refq.size() != 0) void'(refq.pop_front());
    end
  end

  initial begin
    #30 rst_n = 1;
    repeat (3) @(posedge rclk);
    check(rd_empty && rd_count == 0, "empty after reset");
    // phase 1: fill
    for (int i = 0; i < D; i++) begin
      @(posedge wclk);
      check(!wr_full, "not full before 1024 words");
      wr_en <= 1; wr_data <= W'(i * 7 + 3);
      refq.push_back(W'(i * 7 + 3));
    end
    @(posedge wclk); wr_en <= 0;
    @(posedge wclk);
    check(wr_full && int'(wr_count) == D, "full after 1024 words");
    @(posedge wclk); wr_en <= 1; wr_data <= '1;      // must be ignored
    @(posedge wclk); wr_en <= 0;
    repeat (4) @(posedge rclk);
    check(int'(rd_count) == D, $sformatf("reader sees 1024 words (%0d)", rd_count));
    // phase 2: drain
    @(posedge rclk); rd_en <= 1;
    while (!rd_empty) @(posedge rclk);
    rd_en <= 0;
    repeat (2) @(posedge rclk);
    check(pops == D && pop_bad == 0, $sformatf("drained %0d words, %0d wrong", pops, pop_bad));
    check(refq.size() == 0, "ignored write left no word behind");
    // phase 3: random traffic
    fork
      begin
        for (int i = 0; i < 5000; i++) begin
          @(posedge wclk);
          wr_en <= 0;
          if ($urandom_range(3) != 0 && int'(wr_count) < D - 2) begin
            logic [W-1:0] d;
            d = W'({$urandom, $urandom});
            wr_en <= 1; wr_data <= d; refq.push_back(d);
          end
        end
        @(posedge wclk); wr_en <= 0;
      end
      begin
        for (int i = 0; i < 9000; i++) begin
          @(posedge rclk);
          rd_en <= ($urandom_range(2) != 0);
        end
        rd_en <= 1;
        repeat (200) @(posedge rclk);
        rd_en <= 0;
      end
    join
    repeat (4) @(posedge rclk);
    check(pop_bad == 0, $sformatf("random traffic: %0d wrong words", pop_bad));
    check(refq.size() == 0 && rd_empty, "random traffic: everything delivered");
    check(pops > 4000, "random traffic: words moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
