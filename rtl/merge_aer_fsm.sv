// merge_aer_fsm: merges the partial addresses of the DSM modules into full
// AER addresses.
//
// Each cycle it looks at the empty flags of the M partial FIFOs, picks the
// first non-empty one in round-robin order (starting after the module it
// served last), pops it, and writes
//   ADDR_BASE + module_index * N_PER_MODULE + partial_address
// into the AER FIFO. So the full address of input line j is ADDR_BASE + j,
// the same numbering the MSM uses. The document says only that this FSM
// builds the full address from the partial address and the empty signals;
// the round-robin choice and the address formula are this design's own.
// Nothing is popped while the AER FIFO is full.
//
// Timing: one event per clock cycle at most; a module with data waits at
// most M-1 cycles for its turn.
module merge_aer_fsm
  import spike_mon_pkg::*;
#(
  parameter int unsigned M            = 4,   // number of DSM modules
  parameter int unsigned N_PER_MODULE = 8,   // spike lines per module
  parameter int unsigned ADDR_BASE    = 0
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [M-1:0]                    empty,
  input  logic [M-1:0][$clog2(N_PER_MODULE)-1:0] partial_addr,
  output logic [M-1:0]                    rd,
  input  logic                            aer_full,
  output logic                            aer_wr,
  output aer_addr_t                       aer_data
);

  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1;

  logic [MW-1:0] last;       // module served most recently
  logic [MW-1:0] sel;
  logic          found;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int unsigned k = 1; k <= M; k++) begin
      int unsigned c;
      c = (int'(last) + k) % M;
      if (!found && !empty[c]) begin
        found = 1'b1;
        sel   = MW'(c);
      end
    end
  end

  assign aer_wr   = found && !aer_full;
  assign aer_data = aer_addr_t'(ADDR_BASE + int'(sel) * N_PER_MODULE + int'(partial_addr[sel]));

  always_comb begin
    rd = '0;
    if (aer_wr) rd[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last <= MW'(M - 1);
    else if (aer_wr) last <= sel;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rd));
  assert property (@(posedge clk) disable iff (!rst_n) (rd & empty) == '0);

endmodule
