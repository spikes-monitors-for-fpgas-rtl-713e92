// tb_dsm_module: one DSM module (scanner + partial FIFO, depth 4) read by a
// randomly slow consumer. In a sparse phase (each line fires at most once per
// 4N cycles) every spike must come out exactly once and nothing may be lost;
// in a dense phase the FIFO fills, and spikes in must equal partial
// addresses out plus lost_count, with no line producing more events than it
// had spikes.
module tb_dsm_module;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] spikes = '0;
  logic rd = 0, empty;
  logic [2:0] partial_addr;
  logic [3:0] lost_count;
  int checks = 0, failures = 0;
  int in_cnt [N], out_cnt [N];
  int total_lost = 0, full_cycles = 0;
  bit slow = 0;

  dsm_module #(.N(N), .FIFO_DEPTH(4)) dut (.*);

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
    for (int i = 0; i < N; i++) if (spikes[i]) in_cnt[i]++;
    if (rd && !empty) out_cnt[partial_addr]++;
    total_lost += int'(lost_count);
    if (rd == 0 && !empty && slow) full_cycles++;
    rd <= slow ? (($urandom % 6) == 0) : 1'b1;
  end

  task automatic compare_exact();
    for (int i = 0; i < N; i++) check(in_cnt[i] == out_cnt[i], "per-line event count");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Sparse: lines fire in turn, 4N cycles apart per line.
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      spikes = (($urandom % 4) == 0) ? (N'(1) << (i % N)) : '0;
      if (i % 4 != 0) spikes = '0;
    end
    @(negedge clk); spikes = '0;
    repeat (4 * N) @(negedge clk);
    compare_exact();
    check(total_lost == 0, "no loss when sparse");
    // Dense with a slow reader: FIFO fills, scanner stalls, spikes merge.
    slow = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      spikes = N'($urandom) & N'($urandom) & N'($urandom);
    end
    @(negedge clk); spikes = '0;
    slow = 0;
    repeat (4 * N + 8) @(negedge clk);
    begin
      automatic int tin = 0, tout = 0;
      for (int i = 0; i < N; i++) begin
        tin += in_cnt[i]; tout += out_cnt[i];
        check(out_cnt[i] <= in_cnt[i], "no invented events");
      end
      check(tin == tout + total_lost, "spikes in = events + lost");
      check(tout > 0, "events came out");
    end
    check(empty, "drained");
    check(total_lost > 0, "loss happened when dense");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
