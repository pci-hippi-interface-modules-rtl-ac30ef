// tb_dst_hippi_ctrl - checks the Destination HIPPI control against a
// behavioural HIPPI source, with the data FIFO modelled as a queue that the
// testbench drains only when it chooses.
// Checked: no CONNECT while the board is not armed; CONNECT and the I-Field
// once armed; exactly four READYs in flight with an empty 1k FIFO; READY
// held back while the FIFO cannot take another burst and resumed after it
// drains; every word stored with its parity; packet start/end and connection
// end events with their word counts; a parity error passed through
// untouched; an LLRC error reported; an overflow reported when a
// misbehaving source sends without credit.
module tb_dst_hippi_ctrl;
  import hippi_pkg::*;
  localparam int D = 1024;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #20 clk = ~clk;

  logic        request, connect, ready, packet, burst;
  logic [31:0] data;
  logic [3:0]  parity;
  logic        accept = 0, connected;
  logic        fifo_wr_en, fifo_wr_full;
  logic [35:0] fifo_wr_data;
  logic [10:0] fifo_wr_count;
  logic        ev_wr_en;
  hippi_event_t ev_wr_data;

  dst_hippi_ctrl #(.FIFO_DEPTH(D)) dut (
    .clk, .rst_n, .h_request(request), .h_connect(connect), .h_data(data),
    .h_parity(parity), .h_ready(ready), .h_packet(packet), .h_burst(burst),
    .accept, .fifo_wr_en, .fifo_wr_data, .fifo_wr_full, .fifo_wr_count,
    .ev_wr_en, .ev_wr_data, .connected);

  hippi_tx_model tx (.clk, .request, .connect, .data, .parity, .ready, .packet, .burst);

  // FIFO and event sink
  logic [35:0]  fifo [$];
  hippi_event_t evq [$];
  bit           drain = 0;
  int           stored = 0;
  always @(negedge clk) begin
    fifo_wr_count = 11'(fifo.size());
    fifo_wr_full  = (fifo.size() >= D);
  end
  always @(posedge clk) begin
    if (fifo_wr_en) begin fifo.push_back(fifo_wr_data); stored++; end
    if (drain && fifo.size() != 0) void'(fifo.pop_front());
    if (ev_wr_en) evq.push_back(ev_wr_data);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_event(input ev_kind_e k, input int idx, input string what);
    check(evq.size() != 0 && evq[0].kind == k && evq[0].index == 32'(idx),
          $sformatf("%s: event %s idx %0d (got %0d events, head kind %0d idx %0d)", what,
                    k.name(), idx, evq.size(), evq.size() != 0 ? evq[0].kind : 0,
                    evq.size() != 0 ? evq[0].index : 0));
    if (evq.size() != 0) void'(evq.pop_front());
  endtask

  function automatic logic [3:0] par(input logic [31:0] d);
    for (int i = 0; i < 4; i++) par[i] = ~^d[8*i +: 8];
  endfunction

  initial begin
    int bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // not armed: no connection
    fork tx.open_conn(32'hABCD_0001); join_none
    repeat (30) @(posedge clk);
    check(!connect, "no CONNECT while not armed");
    accept = 1;
    repeat (10) @(posedge clk);
    check(connect && connected, "CONNECT once armed");
    check(evq.size() == 1 && evq[0].payload == 32'hABCD_0001, "I-Field captured");
    expect_event(EV_CONN_START, 0, "connect");
    repeat (30) @(posedge clk);
    check(tx.readies == 4, $sformatf("four bursts granted into empty FIFO (%0d)", tx.readies));

    // packet 1: 600 words, FIFO not drained
    tx.send_packet(600, 1);
    repeat (20) @(posedge clk);
    check(fifo.size() == 600, $sformatf("600 words stored (%0d)", fifo.size()));
    check(tx.readies == 4, "READY held while FIFO cannot take another burst");
    bad = 0;
    for (int k = 0; k < 600; k++)
      if (fifo[k] != {par(tx.word_of(1, k)), tx.word_of(1, k)}) bad++;
    check(bad == 0, $sformatf("packet 1 words and parity (%0d wrong)", bad));
    expect_event(EV_PKT_START, 0, "packet 1");
    expect_event(EV_PKT_END, 600, "packet 1");
    drain = 1;
    repeat (700) @(posedge clk);
    check(tx.readies == 7, $sformatf("READY resumed after drain (%0d)", tx.readies));

    // packet 2: parity error at word 5, LLRC error on its first burst
    drain = 0;
    tx.send_packet(300, 2, 5, 0);
    repeat (20) @(posedge clk);
    check(fifo.size() == 300, "packet 2 stored");
    check(fifo[5][35:32] == ~par(tx.word_of(2, 5)), "bad parity passed through");
    check(fifo[6][35:32] == par(tx.word_of(2, 6)), "good parity after it");
    expect_event(EV_PKT_START, 600, "packet 2");
    expect_event(EV_LLRC_ERR, 856, "packet 2 LLRC");
    expect_event(EV_PKT_END, 900, "packet 2");
    drain = 1;
    repeat (400) @(posedge clk);

    // overflow: source sends without credit into a FIFO that is not drained
    drain = 0;
    tx.credits = tx.credits + 8;
    tx.send_packet(1300, 3);
    repeat (10) @(posedge clk);
    check(fifo.size() == D, "FIFO filled");
    expect_event(EV_PKT_START, 900, "packet 3");
    check(evq.size() != 0 && evq[0].kind == EV_OVERFLOW, "overflow reported");
    while (evq.size() != 0 && evq[0].kind == EV_OVERFLOW) void'(evq.pop_front());
    expect_event(EV_PKT_END, 2200, "packet 3");
    drain = 1;
    tx.close_conn();
    repeat (5) @(posedge clk);
    check(!connect && !connected, "CONNECT dropped after REQUEST");
    expect_event(EV_CONN_END, 2200, "connection end");
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
