// tb_spikes2aer_fsm: the MSM word scanner against a snapshot queue model.
//
// The testbench plays the Spikes FIFO (a queue with show-ahead head) and the
// Mapping ROM (address = 0x200 + bit index), and throttles the AER FIFO with
// a random full flag. It checks that every set bit of every snapshot comes
// out once, in snapshot order and ascending bit order, that nothing is
// written while full, and that with the FIFO never full a word takes W + 3
// cycles (spacing between consecutive pops).
module tb_spikes2aer_fsm;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0;
  logic spk_empty, spk_rd, aer_full = 0, aer_wr, busy;
  logic [W-1:0] spk_data;
  logic [2:0] rom_idx;
  logic [15:0] rom_addr, aer_data;
  int checks = 0, failures = 0, stalls = 0;
  logic [W-1:0] q[$];
  logic [15:0] exp_q[$];
  int last_pop = -1, cyc = 0, n_spacing = 0;
  bit throttle = 0, spacing_phase = 0, pop_pending = 0;

  spikes2aer_fsm #(.W(W)) dut (.*);

  assign spk_empty = (q.size() == 0);
  assign spk_data  = (q.size() > 0) ? q[0] : '0;
  assign rom_addr  = 16'h0200 + 16'(rom_idx);

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

  // Drive aer_full and sample the DUT at each edge.
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (aer_wr) begin
      check(!aer_full, "no write while full");
      check(exp_q.size() > 0, "event expected");
      if (exp_q.size() > 0) check(aer_data == exp_q.pop_front(), "event address and order");
    end
    if (aer_full && busy && exp_q.size() > 0) stalls++;
    if (spk_rd) begin
      if (spacing_phase && last_pop >= 0) begin
        check(cyc - last_pop == W + 3, "W+3 cycles per snapshot");
        n_spacing++;
      end
      last_pop = cyc;
      pop_pending = 1;
    end
    aer_full <= throttle ? (($urandom % 3) == 0) : 1'b0;
  end

  // Pop the model FIFO away from the active edge so the DUT samples the
  // head word that was current at the edge.
  always @(negedge clk) if (pop_pending) begin
    void'(q.pop_front());
    pop_pending = 0;
  end

  task automatic push_word(logic [W-1:0] w);
    q.push_back(w);
    for (int b = 0; b < W; b++) if (w[b]) exp_q.push_back(16'h0200 + 16'(b));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Phase 1: back-to-back words, no back-pressure, check the rate.
    spacing_phase = 1;
    @(negedge clk);
    for (int i = 0; i < 20; i++) push_word(W'($urandom) | 8'h01);
    push_word(8'hFF);
    push_word(8'h80);
    wait (q.size() == 0 && exp_q.size() == 0);
    repeat (W + 4) @(posedge clk);
    spacing_phase = 0;
    // Phase 2: random words with a randomly full AER FIFO.
    throttle = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (($urandom % 4) == 0) push_word(W'($urandom));
    end
    wait (q.size() == 0 && exp_q.size() == 0);
    repeat (W + 4) @(posedge clk);
    check(!busy, "back in IDLE");
    check(n_spacing >= 20, "rate measured");
    check(stalls > 0, "back-pressure stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
