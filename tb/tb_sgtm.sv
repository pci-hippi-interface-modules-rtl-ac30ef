// tb_sgtm - checks the scatter-gather table memory at its full 64k-word
// size: words written through the host port read back on both ports with
// one cycle of latency, including the first and last address.
module tb_sgtm;
  localparam int N = 65536;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        a_we = 0;
  logic [15:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, a_rdata, b_rdata;

  sgtm #(.WORDS(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] val(input int a);
    return 32'(a) * 32'h9E37_79B9 + 32'h1234;
  endfunction

  int addrs [$] = '{0, 1, 2, 77, 1000, 32767, 32768, 65534, 65535};

  initial begin
    foreach (addrs[i]) begin
      @(posedge clk); a_we <= 1; a_addr <= 16'(addrs[i]); a_wdata <= val(addrs[i]);
    end
    @(posedge clk); a_we <= 0;
    foreach (addrs[i]) begin
      @(posedge clk); a_addr <= 16'(addrs[i]); b_addr <= 16'(addrs[addrs.size()-1-i]);
      @(posedge clk); #1;
      check(a_rdata == val(addrs[i]), $sformatf("host port read %0d", addrs[i]));
      check(b_rdata == val(addrs[addrs.size()-1-i]), "engine port read");
    end
    // overwrite one word, read on port B in the following cycle
    @(posedge clk); a_we <= 1; a_addr <= 16'd77; a_wdata <= 32'hDEAD_BEEF; b_addr <= 16'd77;
    @(posedge clk); a_we <= 0;
    @(posedge clk); #1;
    check(b_rdata == 32'hDEAD_BEEF, "engine port sees overwrite");
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
