// spikes_monitors_top: the two spike monitors side by side.
//
// The same W spike lines (N_NEURONS neurons x 2 lines, one clock-wide pulse
// per spike) drive both the Massive Spikes Monitor (msm) and the Distributed
// Spikes Monitor (dsm). Each monitor has its own AER output port: a 16-bit
// address, an output enable for the tri-state data pads, an active-low
// request and an active-low acknowledge from the receiver. This mirrors the
// original comparison set-up, in which one stimulus drives both monitors and
// each monitor's AER bus goes to an event logger. Both monitors number line
// j as address j. msm_lost / dsm_lost count the spikes each monitor dropped
// in the current cycle.
module spikes_monitors_top
  import spike_mon_pkg::*;
#(
  parameter int unsigned N_NEURONS          = 16,
  parameter int unsigned SPIKES_FIFO_DEPTH  = 16,
  parameter int unsigned PARTIAL_FIFO_DEPTH = 16,
  parameter int unsigned AER_DEPTH          = AER_FIFO_DEPTH,
  localparam int unsigned W                 = N_NEURONS * 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [W-1:0]           spikes,
  // MSM AER port
  output logic                   msm_aer_req_n,
  input  logic                   msm_aer_ack_n,
  output aer_addr_t              msm_aer_data,
  output logic                   msm_aer_oe,
  output logic [$clog2(W+1)-1:0] msm_lost,
  // DSM AER port
  output logic                   dsm_aer_req_n,
  input  logic                   dsm_aer_ack_n,
  output aer_addr_t              dsm_aer_data,
  output logic                   dsm_aer_oe,
  output logic [$clog2(W+1)-1:0] dsm_lost
);

  msm #(
    .N_NEURONS(N_NEURONS), .BITS_PER_SPIKE(2),
    .SPIKES_FIFO_DEPTH(SPIKES_FIFO_DEPTH), .AER_DEPTH(AER_DEPTH)
  ) u_msm (
    .clk, .rst_n, .spikes,
    .aer_req_n (msm_aer_req_n),
    .aer_ack_n (msm_aer_ack_n),
    .aer_data  (msm_aer_data),
    .aer_oe    (msm_aer_oe),
    .lost_count(msm_lost)
  );

  dsm #(
    .N_SPIKES(W), .PARTIAL_FIFO_DEPTH(PARTIAL_FIFO_DEPTH), .AER_DEPTH(AER_DEPTH)
  ) u_dsm (
    .clk, .rst_n, .spikes,
    .aer_req_n (dsm_aer_req_n),
    .aer_ack_n (dsm_aer_ack_n),
    .aer_data  (dsm_aer_data),
    .aer_oe    (dsm_aer_oe),
    .lost_count(dsm_lost)
  );

endmodule
