// dsm_module: one of the four identical sub-circuits of the Distributed
// Spikes Monitor: a spike scanner (spikes_scan_fsm) and its partial AER FIFO.
//
// The scanner turns the N spike lines of this quarter of the input into
// partial addresses 0..N-1 and queues them in a first-word-fall-through FIFO
// of FIFO_DEPTH words. The merge FSM reads that FIFO through rd / empty /
// partial_addr and adds the module's offset. Structure follows the original
// design's module diagram; the FIFO depth is not given there and is this
// design's choice.
//
// Timing: a partial address written by the scanner in cycle t is visible on
// partial_addr, with empty low, in cycle t+1.
module dsm_module #(
  parameter int unsigned N          = 8,   // spike lines in this module
  parameter int unsigned FIFO_DEPTH = 16   // partial AER FIFO words
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           spikes,
  input  logic                   rd,
  output logic                   empty,
  output logic [$clog2(N)-1:0]   partial_addr,
  output logic [$clog2(N+1)-1:0] lost_count
);

  localparam int unsigned PW = $clog2(N);

  logic          full, wr;
  logic [PW-1:0] wr_addr;
  logic [$clog2(FIFO_DEPTH):0] count;

  spikes_scan_fsm #(.N(N)) u_scan (
    .clk, .rst_n, .spikes,
    .fifo_full    (full),
    .wr           (wr),
    .partial_addr (wr_addr),
    .lost_count   (lost_count)
  );

  sync_fifo #(.WIDTH(PW), .DEPTH(FIFO_DEPTH)) u_partial_fifo (
    .clk, .rst_n,
    .wr_en   (wr),
    .wr_data (wr_addr),
    .rd_en   (rd),
    .rd_data (partial_addr),
    .empty   (empty),
    .full    (full),
    .count   (count)
  );

endmodule
