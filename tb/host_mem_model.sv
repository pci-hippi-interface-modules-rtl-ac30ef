// host_mem_model - behavioural model of host memory as seen through the PCI
// controller's bus-master port (the PCI controller itself is a bought-in
// part and is not modelled).
//
// Write port: one word per wr_valid/wr_ready handshake. Read port: requests
// accepted by rq_valid/rq_ready, data returned in order RD_LAT cycles later
// on rs_valid/rs_data. stall_pct (0..100) makes wr_ready and rq_ready drop
// at random to imitate a busy PCI bus. Words never written read back as
// pattern(addr).
module host_mem_model #(
  parameter int RD_LAT = 4
) (
  input  logic        clk,
  input  logic        wr_valid,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_data,
  output logic        wr_ready,
  input  logic        rq_valid,
  input  logic [31:0] rq_addr,
  output logic        rq_ready,
  output logic        rs_valid,
  output logic [31:0] rs_data
);
  logic [31:0] mem [int unsigned];
  int          stall_pct = 0;
  int          writes = 0, reads = 0, stall_cycles = 0;
  longint      cyc = 0;
  logic [31:0] pend_addr [$];
  longint      pend_due  [$];

  function automatic logic [31:0] pattern(input logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5A5A_0000;
  endfunction

  function automatic logic [31:0] peek(input logic [31:0] a);
    if (mem.exists(a >> 2)) return mem[a >> 2];
    return pattern(a);
  endfunction

  initial begin
    wr_ready = 1'b1;
    rq_ready = 1'b1;
    rs_valid = 1'b0;
    rs_data  = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (wr_valid && wr_ready) begin
      mem[wr_addr >> 2] = wr_data;
      writes++;
    end
    if (wr_valid && !wr_ready) stall_cycles++;
    if (rq_valid && rq_ready) begin
      pend_addr.push_back(rq_addr);
      pend_due.push_back(cyc + longint'(RD_LAT));
      reads++;
    end
    rs_valid <= 1'b0;
    if (pend_due.size() != 0 && pend_due[0] <= cyc) begin
      rs_valid <= 1'b1;
      rs_data  <= peek(pend_addr[0]);
      void'(pend_addr.pop_front());
      void'(pend_due.pop_front());
    end
    wr_ready <= ($urandom_range(99) >= stall_pct);
    rq_ready <= ($urandom_range(99) >= stall_pct);
  end
endmodule
