// tb_spikes_scan_fsm: the DSM module scanner against a per-line model.
//
// The model keeps one "outstanding" flag per line: a spike sets it, an
// event for that line clears it, and a spike on a line that is still
// outstanding is a lost (merged) spike. The testbench checks that every
// event names an outstanding line, that lost_count equals the model's count
// each cycle, that nothing is written while the FIFO is full, that an
// isolated spike is written within N cycles, and that everything drains.
module tb_spikes_scan_fsm;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] spikes = '0;
  logic fifo_full = 0, wr;
  logic [2:0] partial_addr;
  logic [3:0] lost_count;
  int checks = 0, failures = 0;
  bit outstanding [N];
  int total_in = 0, total_out = 0, total_lost = 0, stalls = 0;
  int lat_start = -1, cyc = 0, max_lat = 0;
  bit lat_phase = 0;

  spikes_scan_fsm #(.N(N)) dut (.*);

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
    automatic int lost = 0;
    cyc++;
    if (fifo_full) check(!wr, "no write while full");
    if (fifo_full && outstanding.sum() with (int'(item)) > 0) stalls++;
    if (wr) begin
      check(outstanding[partial_addr], "event for an outstanding line");
      outstanding[partial_addr] = 0;
      total_out++;
      if (lat_phase) begin
        if (cyc - lat_start > max_lat) max_lat = cyc - lat_start;
      end
    end
    for (int i = 0; i < N; i++) if (spikes[i]) begin
      total_in++;
      if (outstanding[i]) lost++; else outstanding[i] = 1;
    end
    check(lost_count == 4'(lost), "lost_count");
    total_lost += lost;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Phase 1: isolated single spikes, check latency <= N cycles.
    lat_phase = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      spikes = N'(1) << ($urandom % N);
      lat_start = cyc + 1;
      @(negedge clk);
      spikes = '0;
      repeat (N + 2) @(negedge clk);
    end
    lat_phase = 0;
    check(max_lat <= N && max_lat >= 1, "single-spike latency within N cycles");
    // Phase 2: dense random spikes with random back-pressure.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      spikes    = N'($urandom) & N'($urandom);
      fifo_full = ($urandom % 4) == 0;
    end
    @(negedge clk);
    spikes = '0; fifo_full = 0;
    repeat (2 * N + 4) @(negedge clk);
    check(outstanding.sum() with (int'(item)) == 0, "all spikes drained");
    check(total_in == total_out + total_lost, "spikes in = events + lost");
    check(total_lost > 0, "merge loss happened");
    check(stalls > 0, "back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
