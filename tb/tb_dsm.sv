// tb_dsm: Distributed Spikes Monitor end to end with 16 lines (four modules
// of 4), partial FIFOs of 4 and an AER FIFO of 16, and a randomly slow
// receiver. Events may leave in any order across modules, so the check is
// per line: in the sparse phase every spike comes out exactly once as
// address j and nothing is lost, and the first REQ follows a lone spike
// within a fixed bound; in the dense phase the FIFOs fill, spikes in must
// equal events out plus lost_count, and no line may produce more events
// than it had spikes.
module tb_dsm;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] spikes = '0;
  logic aer_req_n, aer_ack_n, aer_oe;
  logic [15:0] aer_data;
  logic [4:0] lost_count;
  logic got; logic [15:0] got_data;
  int unsigned perr; longint unsigned nev;
  int checks = 0, failures = 0;
  int in_cnt [N], out_cnt [N];
  int n_lost = 0, cyc = 0, t_spike = 0, max_lat = 0, bad_addr = 0;
  bit lat_phase = 0, first_seen = 0;

  dsm #(.N_SPIKES(N), .PARTIAL_FIFO_DEPTH(4), .AER_DEPTH(16)) dut (
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
    for (int i = 0; i < N; i++) if (spikes[i]) in_cnt[i]++;
    n_lost += int'(lost_count);
    if (got) begin
      if (got_data < N) out_cnt[got_data]++; else bad_addr++;
    end
    if (lat_phase && !first_seen && !aer_req_n) begin
      first_seen = 1;
      if (cyc - t_spike > max_lat) max_lat = cyc - t_spike;
    end
  end

  function automatic int total(ref int c [N]);
    int s = 0;
    for (int i = 0; i < N; i++) s += c[i];
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Sparse: one lone spike at a time.
    lat_phase = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      spikes = N'(1) << ($urandom % N);
      t_spike = cyc + 1;
      first_seen = 0;
      @(negedge clk);
      spikes = '0;
      repeat (40) @(negedge clk);
    end
    lat_phase = 0;
    // scan <= 4 cycles, partial FIFO 1, merge 1, AER FIFO 1, READ_ADDR 1, REQ 1
    check(max_lat <= 10, "lone-spike latency");
    for (int i = 0; i < N; i++) check(in_cnt[i] == out_cnt[i], "per-line count when sparse");
    check(n_lost == 0, "no loss when sparse");
    // Dense
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      spikes = N'($urandom) & N'($urandom);
    end
    @(negedge clk); spikes = '0;
    repeat (3000) @(negedge clk);
    for (int i = 0; i < N; i++) check(out_cnt[i] <= in_cnt[i], "no invented events");
    check(bad_addr == 0, "addresses in range");
    check(total(in_cnt) == total(out_cnt) + n_lost, "spikes in = events + lost");
    check(n_lost > 0, "loss happened when dense");
    check(perr == 0, "AER protocol respected");
    check(aer_req_n && !aer_oe, "drained and idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
