// spikes_scan_fsm: spike scanner inside one module of the Distributed Spikes
// Monitor (DSM).
//
// Holds the module's N spike lines in a pending register and tests one bit
// per clock, round-robin from bit 0 to N-1 and back. When the bit under test
// is set, its index (the partial AER address) is written to the module's
// partial-address FIFO and the bit is cleared. New spikes are OR-ed into the
// register every cycle, so a spike is only lost if its own line fires again
// before the scanner has reached it (the two spikes merge into one event).
// The register, the bit-by-bit search and the index as partial address
// follow the original design; the document does not say when the register
// is reloaded, so the accumulate-and-clear register is this design's choice.
// If the FIFO is full the scan waits on the set bit, so nothing already in
// the register is dropped.
//
// Timing: a spike on line i that arrives while the scan pointer is at bit p
// is written after ((i - p) mod N) + 1 cycles at most, when nothing stalls.
// lost pulses for each cycle in which at least one incoming spike merged with
// a pending one; lost_count tells how many.
module spikes_scan_fsm #(
  parameter int unsigned N = 8                    // spike lines per module
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           spikes,
  input  logic                   fifo_full,
  output logic                   wr,
  output logic [$clog2(N)-1:0]   partial_addr,
  output logic [$clog2(N+1)-1:0] lost_count
);

  localparam int unsigned PW = $clog2(N);

  logic [N-1:0]  pending;
  logic [PW-1:0] ptr;
  logic [N-1:0]  clr;
  logic          hit;

  assign hit          = pending[ptr];
  assign wr           = hit && !fifo_full;
  assign partial_addr = ptr;
  assign clr          = wr ? (N'(1) << ptr) : '0;

  // Spikes arriving on a line that is still pending (and not being sent
  // this cycle) merge with it and are lost.
  always_comb begin
    lost_count = '0;
    for (int unsigned i = 0; i < N; i++)
      if (spikes[i] && pending[i] && !clr[i]) lost_count = lost_count + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      ptr     <= '0;
    end else begin
      pending <= (pending & ~clr) | spikes;
      if (!(hit && fifo_full))
        ptr <= (ptr == PW'(N - 1)) ? '0 : ptr + 1'b1;
    end
  end

  initial begin
    assert (N >= 2) else $error("spikes_scan_fsm: N must be >= 2");
  end

endmodule
