// sync2 - two-flop synchroniser for a single level signal entering a clock
// domain. Output follows the input two clock edges later; reset clears it.
// The boards need it where a level or toggle crosses between the PCI and
// HIPPI clocks; the circuit itself is a standard choice of this design.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      q  <= 1'b0;
    end else begin
      s1 <= d;
      q  <= s1;
    end
  end
endmodule
