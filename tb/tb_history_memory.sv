// tb_history_memory - checks the history memory at its full 64k-word size:
// a run of records written by the engine port reads back on the host port
// one cycle after the address, and unwritten words are untouched.
module tb_history_memory;
  localparam int N = 65536;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        w_en = 0;
  logic [15:0] w_addr = 0, r_addr = 0;
  logic [31:0] w_data = 0, r_data;

  history_memory #(.WORDS(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // background pattern in a few words
    for (int a = 0; a < 4; a++) begin
      @(posedge clk); w_en <= 1; w_addr <= 16'(100 + a); w_data <= 32'hAAAA_0000 + 32'(a);
    end
    // records at the start and at the end of the memory
    for (int a = 0; a < 8; a++) begin
      @(posedge clk); w_en <= 1; w_addr <= 16'(a); w_data <= 32'h3000_0000 | 32'(a * 5);
    end
    @(posedge clk); w_en <= 1; w_addr <= 16'hFFFF; w_data <= 32'h5000_1234;
    @(posedge clk); w_en <= 0;
    for (int a = 0; a < 8; a++) begin
      @(posedge clk); r_addr <= 16'(a);
      @(posedge clk); #1;
      check(r_data == (32'h3000_0000 | 32'(a * 5)), $sformatf("record word %0d", a));
    end
    for (int a = 0; a < 4; a++) begin
      @(posedge clk); r_addr <= 16'(100 + a);
      @(posedge clk); #1;
      check(r_data == 32'hAAAA_0000 + 32'(a), "other words kept");
    end
    @(posedge clk); r_addr <= 16'hFFFF;
    @(posedge clk); #1;
    check(r_data == 32'h5000_1234, "last word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
