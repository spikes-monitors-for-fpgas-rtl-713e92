// msm: Massive Spikes Monitor.
//
// Encodes the spikes of N_NEURONS neurons (BITS_PER_SPIKE lines each, so
// W = N_NEURONS x BITS_PER_SPIKE lines) as AER events. Three stages:
//   1. Snapshot: every clock cycle in which any line is high (an OR of all
//      lines), the whole W-bit word is written to the Spikes FIFO. A word
//      that arrives while the FIFO is full (and not being read) is dropped
//      with all its spikes.
//   2. Encode: spikes2aer_fsm pops one word at a time and tests it bit by
//      bit; each set bit is mapped through mapping_rom to a 16-bit address
//      and written to the 1024-word AER FIFO.
//   3. Send: aer_handshake_fsm transmits the addresses with the 4-phase
//      active-low REQ/ACK protocol.
// Spikes that fire in the same cycle therefore leave the monitor as a burst
// of events in ascending line order. The structure, the FIFO and ROM sizes
// (W words per snapshot, 1024 x 16 AER FIFO, W x 16 ROM) follow the
// original design. The depth WN of the Spikes FIFO is not given: 16 words
// is this design's choice. lost_count (spikes dropped this cycle because
// the Spikes FIFO was full) is an added observation port for measuring the
// loss ratio; it does not affect the monitor.
//
// Timing: a snapshot word occupies the encoder for W + 3 cycles (35 at the
// default), so the monitor keeps up with at most one spiking cycle in 35.
module msm
  import spike_mon_pkg::*;
#(
  parameter int unsigned N_NEURONS         = 16,
  parameter int unsigned BITS_PER_SPIKE    = 2,
  parameter int unsigned SPIKES_FIFO_DEPTH = 16,   // WN
  parameter int unsigned AER_DEPTH         = AER_FIFO_DEPTH,
  parameter int unsigned ADDR_BASE         = 0,
  parameter int unsigned SYNC_STAGES       = 2,
  localparam int unsigned W                = N_NEURONS * BITS_PER_SPIKE
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [W-1:0]           spikes,
  output logic                   aer_req_n,
  input  logic                   aer_ack_n,
  output aer_addr_t              aer_data,
  output logic                   aer_oe,
  output logic [$clog2(W+1)-1:0] lost_count
);

  // Stage 1: snapshot into the Spikes FIFO
  logic          any_spike;
  logic          spk_full, spk_empty, spk_rd;
  logic [W-1:0]  spk_head;
  logic [$clog2(SPIKES_FIFO_DEPTH):0] spk_count;

  assign any_spike  = |spikes;
  assign lost_count = (any_spike && spk_full && !spk_rd) ? ($clog2(W+1))'($countones(spikes)) : '0;

  sync_fifo #(.WIDTH(W), .DEPTH(SPIKES_FIFO_DEPTH)) u_spikes_fifo (
    .clk, .rst_n,
    .wr_en   (any_spike),
    .wr_data (spikes),
    .rd_en   (spk_rd),
    .rd_data (spk_head),
    .empty   (spk_empty),
    .full    (spk_full),
    .count   (spk_count)
  );

  // Stage 2: bit-serial encoding through the Mapping ROM
  logic [$clog2(W)-1:0] rom_idx;
  aer_addr_t            rom_addr, enc_data;
  logic                 enc_wr, enc_busy;
  logic                 aer_full, aer_empty, aer_rd;
  aer_addr_t            aer_head;
  logic [$clog2(AER_DEPTH):0] aer_count;

  mapping_rom #(.N_WORDS(W), .ADDR_BASE(ADDR_BASE)) u_rom (
    .idx  (rom_idx),
    .addr (rom_addr)
  );

  spikes2aer_fsm #(.W(W)) u_s2a (
    .clk, .rst_n,
    .spk_empty (spk_empty),
    .spk_data  (spk_head),
    .spk_rd    (spk_rd),
    .rom_idx   (rom_idx),
    .rom_addr  (rom_addr),
    .aer_full  (aer_full),
    .aer_wr    (enc_wr),
    .aer_data  (enc_data),
    .busy      (enc_busy)
  );

  sync_fifo #(.WIDTH(AER_W), .DEPTH(AER_DEPTH)) u_aer_fifo (
    .clk, .rst_n,
    .wr_en   (enc_wr),
    .wr_data (enc_data),
    .rd_en   (aer_rd),
    .rd_data (aer_head),
    .empty   (aer_empty),
    .full    (aer_full),
    .count   (aer_count)
  );

  // Stage 3: AER output port
  aer_handshake_fsm #(.SYNC_STAGES(SYNC_STAGES)) u_hs (
    .clk, .rst_n,
    .fifo_empty (aer_empty),
    .fifo_data  (aer_head),
    .fifo_rd    (aer_rd),
    .aer_req_n, .aer_ack_n, .aer_data, .aer_oe
  );

endmodule
