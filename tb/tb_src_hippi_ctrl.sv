// tb_src_hippi_ctrl - checks the Source HIPPI control against a behavioural
// HIPPI destination, with the data and event FIFOs modelled as queues.
// Checked: REQUEST with the I-Field and the connection handshake; no burst
// until a whole burst is in the FIFO; bursts of 256 words with a short last
// burst at each packet end; every word and its parity in order; LLRC words;
// PACKET framing at the packet-end events; no burst without a READY credit
// (also with only one credit allowed); back-to-back full bursts 259 clocks
// apart (256 words, LLRC, idle, decision); REQUEST dropped and the closing
// toggle raised at connection end.
module tb_src_hippi_ctrl;
  import hippi_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #20 clk = ~clk;

  logic        request, connect, ready, packet, burst;
  logic [31:0] data;
  logic [3:0]  parity;
  logic        fifo_rd_en, ev_rd_en, ev_rd_empty, tgl;
  logic [35:0] fifo_rd_data;
  logic [10:0] fifo_rd_count;
  hippi_event_t ev_rd_data;

  src_hippi_ctrl #(.FIFO_DEPTH(1024)) dut (
    .clk, .rst_n, .h_request(request), .h_connect(connect), .h_data(data),
    .h_parity(parity), .h_ready(ready), .h_packet(packet), .h_burst(burst),
    .fifo_rd_en, .fifo_rd_data, .fifo_rd_count,
    .ev_rd_en, .ev_rd_data, .ev_rd_empty, .conn_closed_tgl(tgl));

  hippi_rx_model rx (.clk, .request, .connect, .data, .parity, .ready, .packet, .burst);

  logic [35:0]  fifo [$];
  hippi_event_t evq [$];
  // show-ahead outputs of the modelled FIFOs, refreshed between clock edges
  always @(negedge clk) begin
    fifo_rd_count = 11'(fifo.size());
    fifo_rd_data  = fifo.size() != 0 ? fifo[0] : '0;
    ev_rd_empty   = (evq.size() == 0);
    ev_rd_data    = evq.size() != 0 ? evq[0] : '0;
  end
  always @(posedge clk) begin
    if (fifo_rd_en && fifo.size() != 0) void'(fifo.pop_front());
    if (ev_rd_en && evq.size() != 0) void'(evq.pop_front());
  end

  // credit monitor: bursts started never exceed READYs seen
  int readies = 0, bursts = 0, credit_violations = 0;
  logic p_burst = 0;
  always @(posedge clk) begin
    if (ready) readies++;
    if (burst && !p_burst) begin
      bursts++;
      if (bursts > readies) credit_violations++;
    end
    p_burst <= burst;
    if (!request && !connect) begin readies = 0; bursts = 0; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] sent [$];
  int total = 0;
  task automatic push_words(input int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] w;
      w = 32'hF00D_0000 ^ 32'(total * 13);
      fifo.push_back({byte_parity(w), w});
      sent.push_back(w);
      total++;
    end
  endtask
  task automatic push_ev(input ev_kind_e k, input logic [31:0] idx, input logic [31:0] pl = 0);
    hippi_event_t e;
    e.kind = k; e.index = idx; e.payload = pl;
    evq.push_back(e);
  endtask

  initial begin
    logic t0;
    int bad, blen_bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = tgl;
    // ---------------- connection 1 ----------------
    push_ev(EV_CONN_START, 0, 32'h00C0_FFEE);
    repeat (10) @(posedge clk);
    check(request && connect, "REQUEST answered by CONNECT");
    check(rx.ifield == 32'h00C0_FFEE, "I-Field on the bus with REQUEST");
    push_words(100);                        // less than a burst, no event yet
    repeat (40) @(posedge clk);
    check(packet && rx.words.size() == 0, "packet open, no burst before 256 words");
    push_words(500);
    push_ev(EV_PKT_END, 600);
    push_words(40);
    push_ev(EV_PKT_END, 640);
    push_ev(EV_CONN_END, 640);
    while (request) @(posedge clk);
    repeat (5) @(posedge clk);
    check(tgl != t0, "connection-closed toggle");
    check(!connect, "CONNECT dropped");
    check(rx.words.size() == 640, $sformatf("640 words sent (%0d)", rx.words.size()));
    bad = 0;
    foreach (rx.words[i]) if (rx.words[i] != sent[i]) bad++;
    check(bad == 0, $sformatf("word order and values (%0d wrong)", bad));
    check(rx.par_err == 0 && rx.llrc_err == 0, "parity and LLRC correct");
    check(rx.burst_len.size() == 4 && rx.burst_len[0] == 256 && rx.burst_len[1] == 256 &&
          rx.burst_len[2] == 88 && rx.burst_len[3] == 40, "burst lengths 256,256,88,40");
    check(rx.pkt_end_at.size() == 2 && rx.pkt_end_at[0] == 600 && rx.pkt_end_at[1] == 640,
          "packet ends after words 600 and 640");
    check(rx.burst_start[1] - rx.burst_start[0] == 259,
          $sformatf("full bursts 259 clocks apart (%0d)", rx.burst_start[1] - rx.burst_start[0]));

    // ---------------- connection 2: one credit at a time ----------------
    rx.max_credit = 1;
    rx.words.delete(); rx.burst_len.delete(); rx.burst_start.delete(); rx.pkt_end_at.delete();
    sent.delete(); total = 0;
    push_ev(EV_CONN_START, 0, 32'h0000_0002);
    push_words(1000);
    push_ev(EV_PKT_END, 1000);
    push_ev(EV_CONN_END, 1000);
    repeat (5) @(posedge clk);
    while (request) @(posedge clk);
    repeat (5) @(posedge clk);
    check(rx.words.size() == 1000, "connection 2: 1000 words");
    bad = 0;
    foreach (rx.words[i]) if (rx.words[i] != sent[i]) bad++;
    check(bad == 0, "connection 2: words");
    check(rx.burst_len.size() == 4 && rx.burst_len[3] == 232, "connection 2: bursts");
    check(rx.burst_start[1] - rx.burst_start[0] > 259, "connection 2: waits for each READY");
    check(credit_violations == 0, "no burst without a READY credit");
    check(rx.conns == 2 && rx.conn_ends == 2, "two connections opened and closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
