// mapping_rom: bit-index to AER-address table of the Massive Spikes Monitor.
//
// The MSM scanner walks a snapshot word bit by bit; when it finds a '1' at
// bit i it looks up the AER address of that spike line here and writes it to
// the AER FIFO. The original design sizes this ROM as 2n words of 16 bits
// (two bits per spiking neuron) but does not print its contents; this design
// fills it with ADDR_BASE + i, so spike line i is sent as address
// ADDR_BASE + i. The table is computed at elaboration and held in an array,
// so it maps to distributed ROM. Reads are combinational: the address for
// the bit under test is ready in the same cycle, which lets the scanner
// write one event per cycle.
module mapping_rom
  import spike_mon_pkg::*;
#(
  parameter int unsigned N_WORDS   = 32,      // 2 x n spike lines
  parameter int unsigned ADDR_BASE = 0        // address of spike line 0
) (
  input  logic [$clog2(N_WORDS)-1:0] idx,
  output aer_addr_t                  addr
);

  function automatic aer_addr_t rom_word(int unsigned i);
    return aer_addr_t'(ADDR_BASE + i);
  endfunction

  aer_addr_t rom [N_WORDS];

  always_comb begin
    for (int unsigned i = 0; i < N_WORDS; i++) rom[i] = rom_word(i);
  end

  assign addr = (int'(idx) < int'(N_WORDS)) ? rom[idx] : '0;

endmodule
