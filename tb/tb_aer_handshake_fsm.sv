// tb_aer_handshake_fsm: sends a queue of addresses through the 4-phase
// handshake into the behavioural receiver. Checks the order and value of
// every event, the receiver's protocol checks (data driven and stable while
// REQ is low), that the data lines are released when idle, and, with a
// receiver that answers as fast as it can, the 12-cycle event period
// (4 + 2 x SYNC_STAGES cycles in the sender, 2 x 2 in the receiver).
module tb_aer_handshake_fsm;
  logic clk = 0, rst_n = 0;
  logic fifo_empty, fifo_rd, aer_req_n, aer_ack_n, aer_oe;
  logic [15:0] fifo_data, aer_data;
  logic got; logic [15:0] got_data;
  int unsigned perr; longint unsigned nev;
  int checks = 0, failures = 0;
  logic [15:0] q[$], exp_q[$];
  int cyc = 0, last_rd = -1, n_period = 0;
  bit period_phase = 1, pop_pending = 0;
  logic fast_rx_ack, slow_rx_ack, use_slow = 0;
  logic g1, g2; logic [15:0] d1, d2; int unsigned e1, e2; longint unsigned n1, n2;

  aer_handshake_fsm #(.SYNC_STAGES(2)) dut (
    .clk, .rst_n, .fifo_empty, .fifo_data, .fifo_rd,
    .aer_req_n, .aer_ack_n, .aer_data, .aer_oe
  );

  aer_receiver #(.DELAY_MAX(0)) rx_fast (.clk, .rst_n, .req_n(aer_req_n | use_slow),
    .data(aer_data), .oe(aer_oe), .ack_n(fast_rx_ack), .got(g1), .got_data(d1),
    .protocol_errors(e1), .n_events(n1));
  aer_receiver #(.DELAY_MAX(6)) rx_slow (.clk, .rst_n, .req_n(aer_req_n | !use_slow),
    .data(aer_data), .oe(aer_oe), .ack_n(slow_rx_ack), .got(g2), .got_data(d2),
    .protocol_errors(e2), .n_events(n2));

  assign aer_ack_n = use_slow ? slow_rx_ack : fast_rx_ack;
  assign got = g1 | g2;
  assign got_data = g1 ? d1 : d2;
  assign perr = e1 + e2;
  assign nev = n1 + n2;

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = (q.size() > 0) ? q[0] : 16'hDEAD;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (got) begin
      check(exp_q.size() > 0, "event expected");
      if (exp_q.size() > 0) check(got_data == exp_q.pop_front(), "event value and order");
    end
    if (fifo_rd) begin
      if (period_phase && last_rd >= 0) begin
        check(cyc - last_rd == 12, "12-cycle event period");
        n_period++;
      end
      last_rd = cyc;
      pop_pending = 1;
    end
    if (!aer_oe) check(aer_req_n, "no request without driven data");
  end

  always @(negedge clk) if (pop_pending) begin
    void'(q.pop_front());
    pop_pending = 0;
  end

  task automatic push(logic [15:0] a);
    q.push_back(a); exp_q.push_back(a);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 30; i++) push(16'($urandom));
    wait (exp_q.size() == 0);
    repeat (20) @(posedge clk);
    period_phase = 0;
    use_slow = 1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (($urandom % 8) == 0) push(16'($urandom));
    end
    wait (exp_q.size() == 0);
    repeat (30) @(posedge clk);
    check(perr == 0, "no protocol violations");
    check(nev >= 30, "events received");
    check(n_period >= 29, "period measured");
    check(aer_req_n && !aer_oe, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
