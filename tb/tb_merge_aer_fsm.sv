// tb_merge_aer_fsm: four model partial FIFOs (queues) feed the merge stage.
// The testbench computes the round-robin choice itself and checks every
// written address (0x40 + module x 8 + partial address), that exactly the
// chosen FIFO is popped, that an event is written every cycle in which some
// FIFO holds data and the AER FIFO is not full, and that nothing is written
// while it is full.
module tb_merge_aer_fsm;
  localparam int unsigned M = 4, NPM = 8;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] empty, rd;
  logic [M-1:0][2:0] partial_addr;
  logic aer_full = 0, aer_wr;
  logic [15:0] aer_data;
  int checks = 0, failures = 0, writes = 0, full_waits = 0;
  logic [2:0] q [M][$];
  int last = M - 1;
  bit [M-1:0] pop_mask = '0;

  merge_aer_fsm #(.M(M), .N_PER_MODULE(NPM), .ADDR_BASE(16'h40)) dut (.*);

  always_comb for (int k = 0; k < M; k++) begin
    empty[k] = (q[k].size() == 0);
    partial_addr[k] = (q[k].size() > 0) ? q[k][0] : 3'd0;
  end

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
    automatic int sel = -1;
    for (int k = 1; k <= M; k++) begin
      automatic int c = (last + k) % M;
      if (sel < 0 && q[c].size() > 0) sel = c;
    end
    if (sel >= 0 && aer_full) full_waits++;
    if (sel >= 0 && !aer_full) begin
      check(aer_wr, "event written when data is waiting");
      check(rd == (M'(1) << sel), "round-robin pop");
      check(aer_data == 16'(16'h40 + sel * NPM + q[sel][0]), "full address");
      pop_mask = M'(1) << sel;
      last = sel;
      writes++;
    end else begin
      check(!aer_wr && rd == '0, "idle or blocked");
    end
  end

  always @(negedge clk) begin
    for (int k = 0; k < M; k++) if (pop_mask[k]) void'(q[k].pop_front());
    pop_mask = '0;
    for (int k = 0; k < M; k++)
      if (($urandom % 10) < 2) q[k].push_back(3'($urandom));
    aer_full = ($urandom % 5) == 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    check(writes > 1000, "events merged");
    check(full_waits > 0, "waited on a full AER FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
