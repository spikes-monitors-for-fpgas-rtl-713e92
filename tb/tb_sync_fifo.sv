// tb_sync_fifo: random push/pop test of the show-ahead FIFO against a queue
// model. Checks the head word, empty, full and count every cycle, and that
// a write into a full FIFO is dropped while a write together with a read is
// accepted.
module tb_sync_fifo;
  localparam int W = 8, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  int n_full_drops = 0, n_full_rw = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // Phase bias: fill for a while, then drain, then mix.
      automatic int pw = (cyc % 1000 < 300) ? 80 : (cyc % 1000 < 600) ? 20 : 50;
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(count == q.size(), "count");
      if (q.size() > 0) check(rd_data == q[0], "head data");
      wr_en   = ($urandom % 100) < pw;
      rd_en   = ($urandom % 100) < (100 - pw);
      wr_data = W'($urandom);
      @(posedge clk);
      begin
        automatic bit popped = rd_en && q.size() > 0;
        automatic bit pushed = wr_en && (q.size() < D || popped);
        if (wr_en && q.size() == D && !popped) n_full_drops++;
        if (wr_en && q.size() == D && popped) n_full_rw++;
        if (popped) void'(q.pop_front());
        if (pushed) q.push_back(wr_data);
      end
    end
    check(n_full_drops > 0, "a write into a full FIFO happened");
    check(n_full_rw > 0, "a read+write on a full FIFO happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
