// spikes2aer_fsm: the word scanner of the Massive Spikes Monitor (MSM).
//
// Each word of the Spikes FIFO is a snapshot of all W spike lines taken in
// one clock cycle. When the FIFO holds a word, the FSM pops it into its scan
// register (READ_SPIKES) and then tests one bit per clock (CHECK_SPIKES),
// starting at bit 0. For every '1' it drives the bit index to the Mapping
// ROM and writes the returned address into the AER FIFO in the same cycle.
// After bit W-1 it returns to IDLE, and from there reads the next word.
// States, register names and transitions follow the original design's state
// diagram. Its own choices: the FIFO is first-word-fall-through, so the word
// is captured once in READ_SPIKES; and when the AER FIFO is full the scan
// waits on the current bit instead of dropping the event (the document does
// not say what happens then).
//
// Timing: a word takes W + 3 cycles from leaving IDLE to being back in IDLE
// (1 IDLE, 1 READ_SPIKES, W+1 CHECK_SPIKES), plus one cycle per event stalled
// by a full AER FIFO. An event is written in the cycle its bit is tested.
module spikes2aer_fsm
  import spike_mon_pkg::*;
#(
  parameter int unsigned W = 32             // snapshot width, 2 x n
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Spikes FIFO read side
  input  logic                 spk_empty,
  input  logic [W-1:0]         spk_data,
  output logic                 spk_rd,
  // Mapping ROM
  output logic [$clog2(W)-1:0] rom_idx,
  input  aer_addr_t            rom_addr,
  // AER FIFO write side
  input  logic                 aer_full,
  output logic                 aer_wr,
  output aer_addr_t            aer_data,
  output logic                 busy
);

  localparam int unsigned IW = $clog2(W + 1);

  s2a_state_t     state;
  logic [W-1:0]   int_spikes;
  logic [IW-1:0]  n_spikes;

  logic at_end, bit_set;
  assign at_end  = (n_spikes == IW'(W));
  assign bit_set = !at_end && int_spikes[n_spikes[$clog2(W)-1:0]];

  assign rom_idx  = n_spikes[$clog2(W)-1:0];
  assign spk_rd   = (state == S2A_READ_SPIKES);
  assign aer_wr   = (state == S2A_CHECK) && bit_set && !aer_full;
  assign aer_data = rom_addr;
  assign busy     = (state != S2A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S2A_IDLE;
      int_spikes <= '0;
      n_spikes   <= '0;
    end else begin
      unique case (state)
        S2A_IDLE: begin
          n_spikes <= '0;
          if (!spk_empty) state <= S2A_READ_SPIKES;
        end
        S2A_READ_SPIKES: begin
          int_spikes <= spk_data;
          n_spikes   <= '0;
          state      <= S2A_CHECK;
        end
        S2A_CHECK: begin
          if (at_end)
            state <= S2A_IDLE;
          else if (!(bit_set && aer_full))
            n_spikes <= n_spikes + 1'b1;
        end
        default: state <= S2A_IDLE;
      endcase
    end
  end

  // An event is never written to a full AER FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) aer_wr |-> !aer_full);

endmodule
