// tb_msm: Massive Spikes Monitor end to end with a small configuration
// (4 neurons x 2 lines, Spikes FIFO of 4 words, AER FIFO of 16 events) and a
// randomly slow receiver.
//
// Sparse phase: one spiking cycle at a time, far apart. Every set line must
// come out as address j, in snapshot order and ascending line order, and
// the first event's REQ must fall within a fixed number of cycles.
// Dense phase: a spiking cycle every cycle. The Spikes FIFO overflows; each
// snapshot is either dropped whole (lost_count = its popcount) or sent
// whole, so the event stream must equal the accepted snapshots in order.
module tb_msm;
  localparam int unsigned NN = 4, W = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] spikes = '0;
  logic aer_req_n, aer_ack_n, aer_oe;
  logic [15:0] aer_data;
  logic [3:0] lost_count;
  logic got; logic [15:0] got_data;
  int unsigned perr; longint unsigned nev;
  int checks = 0, failures = 0;
  logic [15:0] exp_q[$];
  int n_in = 0, n_lost = 0, n_dropped_words = 0, cyc = 0, t_spike = 0, max_lat = 0;
  bit lat_phase = 0, first_seen = 0;

  msm #(.N_NEURONS(NN), .BITS_PER_SPIKE(2), .SPIKES_FIFO_DEPTH(4), .AER_DEPTH(16)) dut (
    .clk, .rst_n, .spikes, .aer_req_n, .aer_ack_n, .aer_data, .aer_oe, .lost_count);

  aer_receiver #(.DELAY_MAX(3)) rx (.clk, .rst_n, .req_n(aer_req_n), .data(aer_data),
    .oe(aer_oe), .ack_n(aer_ack_n), .got, .got_data, .protocol_errors(perr), .n_events(nev));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (spikes != 0) begin
      n_in += $countones(spikes);
      if (lost_count != 0) begin
        check(lost_count == 4'($countones(spikes)), "whole snapshot dropped");
        n_lost += int'(lost_count);
        n_dropped_words++;
      end else begin
        for (int b = 0; b < W; b++) if (spikes[b]) exp_q.push_back(16'(b));
      end
    end
    if (lat_phase && !first_seen && !aer_req_n) begin
      first_seen = 1;
      if (cyc - t_spike > max_lat) max_lat = cyc - t_spike;
    end
    if (got) begin
      check(exp_q.size() > 0, "event expected");
      if (exp_q.size() > 0) check(got_data == exp_q.pop_front(), "event address and order");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Sparse phase
    lat_phase = 1;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      spikes = W'($urandom) | W'(1);
      t_spike = cyc + 1;
      first_seen = 0;
      @(negedge clk);
      spikes = '0;
      wait (exp_q.size() == 0);
      repeat (20) @(negedge clk);
    end
    lat_phase = 0;
    // snapshot in FIFO at t+1, IDLE->READ->CHECK, bit 0 written at t+3,
    // visible in AER FIFO at t+4, handshake READ_ADDR at t+5, REQ low at t+7
    check(max_lat <= 8, "first-event latency");
    check(n_lost == 0, "no loss when sparse");
    // Dense phase
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      spikes = W'($urandom);
    end
    @(negedge clk); spikes = '0;
    wait (exp_q.size() == 0);
    repeat (60) @(negedge clk);
    check(n_dropped_words > 0, "Spikes FIFO overflow happened");
    check(perr == 0, "AER protocol respected");
    check(longint'(n_in) == nev + longint'(n_lost), "spikes in = events + lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
