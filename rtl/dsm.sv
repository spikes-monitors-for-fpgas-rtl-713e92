// dsm: Distributed Spikes Monitor.
//
// Splits the N_SPIKES input lines into M = 4 equal quarters. Each quarter
// has its own dsm_module (a bit-by-bit scanner plus a partial-address FIFO),
// so four scanners work in parallel instead of one scanner walking the whole
// word as in the MSM. merge_aer_fsm takes the queued partial addresses in
// round-robin order, turns them into full 16-bit addresses
// (ADDR_BASE + line index) and writes them into the 1024 x 16 AER FIFO, and
// aer_handshake_fsm sends them with the 4-phase active-low REQ/ACK protocol.
// The four modules, the partial/full address split, the AER FIFO size and
// the handshake follow the original design. The partial FIFO depth, the
// scanner's register policy and the merge order are this design's choices.
// lost_count (spikes merged with a still-pending spike of the same line
// this cycle) is an added observation port for measuring the loss ratio.
//
// Timing: each module tests one of its N_SPIKES/4 lines per cycle, so a
// spike waits at most N_SPIKES/4 cycles to be queued; the merge stage moves
// one event per cycle, so the output handshake is the throughput limit.
module dsm
  import spike_mon_pkg::*;
#(
  parameter int unsigned N_SPIKES            = 32,  // must be divisible by 4
  parameter int unsigned PARTIAL_FIFO_DEPTH  = 16,
  parameter int unsigned AER_DEPTH           = AER_FIFO_DEPTH,
  parameter int unsigned ADDR_BASE           = 0,
  parameter int unsigned SYNC_STAGES         = 2,
  localparam int unsigned M                  = 4,
  localparam int unsigned NM                 = N_SPIKES / M,
  localparam int unsigned PW                 = $clog2(NM)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_SPIKES-1:0]           spikes,
  output logic                          aer_req_n,
  input  logic                          aer_ack_n,
  output aer_addr_t                     aer_data,
  output logic                          aer_oe,
  output logic [$clog2(N_SPIKES+1)-1:0] lost_count
);

  logic [M-1:0]          mod_empty, mod_rd;
  logic [M-1:0][PW-1:0]  mod_addr;
  logic [M-1:0][$clog2(NM+1)-1:0] mod_lost;

  for (genvar g = 0; g < M; g++) begin : g_mod
    dsm_module #(.N(NM), .FIFO_DEPTH(PARTIAL_FIFO_DEPTH)) u_mod (
      .clk, .rst_n,
      .spikes       (spikes[g*NM +: NM]),
      .rd           (mod_rd[g]),
      .empty        (mod_empty[g]),
      .partial_addr (mod_addr[g]),
      .lost_count   (mod_lost[g])
    );
  end

  always_comb begin
    lost_count = '0;
    for (int unsigned g = 0; g < M; g++)
      lost_count += ($clog2(N_SPIKES+1))'(mod_lost[g]);
  end

  logic      mrg_wr, aer_full, aer_empty, aer_rd;
  aer_addr_t mrg_data, aer_head;
  logic [$clog2(AER_DEPTH):0] aer_count;

  merge_aer_fsm #(.M(M), .N_PER_MODULE(NM), .ADDR_BASE(ADDR_BASE)) u_merge (
    .clk, .rst_n,
    .empty        (mod_empty),
    .partial_addr (mod_addr),
    .rd           (mod_rd),
    .aer_full     (aer_full),
    .aer_wr       (mrg_wr),
    .aer_data     (mrg_data)
  );

  sync_fifo #(.WIDTH(AER_W), .DEPTH(AER_DEPTH)) u_aer_fifo (
    .clk, .rst_n,
    .wr_en   (mrg_wr),
    .wr_data (mrg_data),
    .rd_en   (aer_rd),
    .rd_data (aer_head),
    .empty   (aer_empty),
    .full    (aer_full),
    .count   (aer_count)
  );

  aer_handshake_fsm #(.SYNC_STAGES(SYNC_STAGES)) u_hs (
    .clk, .rst_n,
    .fifo_empty (aer_empty),
    .fifo_data  (aer_head),
    .fifo_rd    (aer_rd),
    .aer_req_n, .aer_ack_n, .aer_data, .aer_oe
  );

  initial begin
    assert (N_SPIKES % M == 0 && NM >= 2) else $error("dsm: N_SPIKES must be a multiple of 4, at least 8");
  end

endmodule
