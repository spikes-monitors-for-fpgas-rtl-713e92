# Spike monitors for FPGAs: MSM and DSM

A spiking circuit on an FPGA, such as a layer of silicon neurons, has many
output lines. Each line pulses for one clock cycle whenever its neuron fires.
To send that activity to another chip, every spike is turned into an
*address event*: a 16-bit number that identifies the neuron. The events then
travel one at a time over a shared parallel bus with a request/acknowledge
handshake. This is the Address-Event Representation (AER). The hard part is
the *collision*: several neurons fire in the same clock cycle, but the bus
carries one event at a time. A spike monitor has to catch every spike fired in
parallel, queue it, and serialise it without losing too many.

This RTL holds two monitors that solve that problem in different ways. Both are
written from a published comparative study and are built side by side so they
can be compared:

* **MSM, the Massive Spikes Monitor.** It photographs all spike lines in every
  cycle in which at least one fires. One scanner then walks each photograph
  bit by bit.
* **DSM, the Distributed Spikes Monitor.** It splits the lines into four
  quarters. Each quarter has its own scanner and queue, and a merge stage
  rebuilds full addresses from the four queues.

Both monitors end in the same 1024-event AER FIFO and the same 4-phase output
handshake. Both number spike line *j* as AER address *j*.

```
                 +-------------------- msm -------------------------------+
 spikes[31:0] -->| OR -> Spikes FIFO -> spikes2aer_fsm -> AER FIFO -> aer_ |--> REQ/ACK/DATA
        |        |        (16 x 32b)     + mapping_rom     (1024x16)  hand- |
        |        +------------------------------------------------ shake --+
        |        +-------------------- dsm -------------------------------+
        +------->| 4 x dsm_module  --> merge_aer_fsm --> AER FIFO -> aer_  |--> REQ/ACK/DATA
                 | (scan + partial FIFO)                  (1024x16)  hand- |
                 +------------------------------------------------ shake --+
```

## The AER output port (`aer_handshake_fsm`)

Both monitors send events with the same four-phase protocol. REQ and ACK
are active low:

| state      | REQ | data lines            | leaves when          |
|------------|-----|-----------------------|----------------------|
| IDLE       | 1   | not driven (`aer_oe`=0) | AER FIFO not empty |
| READ_ADDR  | 1   | FIFO head, FIFO popped  | next cycle         |
| WAIT_ACK1  | 0   | held                    | ACK low            |
| WAIT_ACK2  | 1   | held                    | ACK high, then IDLE |

The data lines are driven one cycle before REQ falls, which gives the
receiver set-up time. They stay stable until REQ has risen again. The
original port drives the data lines high-impedance when idle. Here `aer_oe`
marks when they are driven, and the tri-state pad belongs in the chip top.

ACK comes from another board, so it passes through a two-flop synchroniser
(`SYNC_STAGES`). This synchroniser is this design's addition. One event
therefore takes 4 + 2·`SYNC_STAGES` = 8 cycles plus the receiver's reaction
time. The behavioural receiver in the testbenches needs two clock edges per
phase, so events leave every 12 cycles (4.17 Mevents/s at 50 MHz). Nothing in
either monitor can go faster than this port: it is the throughput ceiling.

## Massive Spikes Monitor (`msm`)

The MSM is built from three stages.

1. **Snapshot.** The OR of all W = 2·`N_NEURONS` lines is the write enable of
   the Spikes FIFO. Any cycle with a spike stores the whole W-bit word. The
   original design gives each neuron two spike lines, so W = 32 for the
   16 neurons chosen here. If the FIFO is full, the snapshot is lost together
   with all the spikes in it. This is where the MSM loses spikes, and
   `lost_count` reports how many were lost in that cycle.
2. **Scan** (`spikes2aer_fsm`, `mapping_rom`). The FSM goes from IDLE to
   READ_SPIKES, where it pops one word into `int_spikes`. It then stays in
   CHECK_SPIKES and tests one bit per cycle, from bit 0 upwards. For a set bit
   it looks up the bit's address in the mapping ROM and writes that address
   into the AER FIFO in the same cycle. After the last bit it returns to IDLE.
   A word occupies the scanner for **W + 3 cycles (35)**, however few bits are
   set.
3. **Send.** The AER FIFO feeds the output port.

Spikes fired together leave the MSM in ascending line order, and snapshots
leave in arrival order. The scanner's cost is fixed per word, so the MSM
handles at most one spiking cycle in 35. With few spikes per cycle, that is
far below what the output port could carry. This is the weakness the
distributed monitor removes.

If the AER FIFO is full, the scanner waits on the set bit. Back-pressure
therefore fills the Spikes FIFO, and new snapshots are dropped; nothing
already captured is ever discarded.

## Distributed Spikes Monitor (`dsm`)

The N = 32 lines are cut into four modules of N/4 = 8 lines: lines 0–7,
8–15, 16–23 and 24–31.

**Scanner** (`spikes_scan_fsm`). This is the part where this RTL commits to
its own reading, because the original only says that a module keeps its spikes
in a register and searches it bit by bit. Here the register is a *pending*
register:

* incoming spikes are OR-ed into it every cycle;
* a pointer visits one bit per cycle, round-robin;
* when the pointer finds a set bit, it writes the bit index (the *partial
  address*) into the module's partial FIFO and clears the bit.

A spike is lost only when its own line fires again while its previous spike is
still pending. The two spikes merge into one event, and `lost_count` counts
the merge. An isolated spike is queued within 8 cycles. When the partial FIFO
is full, the pointer waits on the set bit.

**Merge** (`merge_aer_fsm`). Each cycle, the merge stage takes the next
non-empty partial FIFO in round-robin order. It pops that FIFO and writes
`module × 8 + partial address` into the AER FIFO: one event per cycle, with no
module starved. The four modules scan in parallel, so the DSM can take up to
4 spikes per cycle into its queues. Only the output port limits it.

Events of different modules can leave in any interleaving. Events of one
module leave in the order its scanner found them.

## How the two compare

`tb_spikes_monitors_top` drives both monitors with the stimulus of the
original study. In each cycle, with probability *p*, K distinct random lines
fire. *p* is chosen to give an average rate of R Mspikes/s at 50 MHz. Result
with seed 1, 20 000 stimulus cycles per point, and the 12-cycle receiver:

| R (Msp/s) | K | MSM out (Mev/s) | DSM out (Mev/s) | MSM loss | DSM loss |
|-----------|---|-----------------|-----------------|----------|----------|
| 2  | 8  | 1.92 | 1.92 | 0.000 | 0.003 |
| 5  | 8  | 4.14 | 4.14 | 0.000 | 0.008 |
| 10 | 8  | 4.15 | 4.15 | 0.335 | 0.345 |
| 20 | 8  | 4.17 | 4.17 | 0.643 | 0.648 |
| 2  | 16 | 1.80 | 1.79 | 0.000 | 0.006 |
| 5  | 16 | 4.04 | 4.03 | 0.000 | 0.008 |
| 10 | 16 | 4.16 | 4.16 | 0.246 | 0.291 |
| 20 | 16 | 4.16 | 4.16 | 0.609 | 0.632 |
| 4  | 2  | 2.85 | 4.08 | 0.295 | 0.009 |

How to read it:

* With 8–16 spikes per spiking cycle, the MSM's 35-cycle scan carries up to
  8–16 spikes, which is more than the port can send in that time. Both
  monitors are limited by the port, and they lose about the same.
* With 2 spikes per cycle (last row), the MSM's scan is the bottleneck and it
  loses 30% of the spikes. At the same point the DSM loses 1%. This is the
  behaviour the DSM was designed for.
* The original study measured the MSM losing far more than the DSM across
  the whole 8–16 range, with the bus saturating near 10 Mevents/s. The clock
  of the original monitors is not known. A 10 Mevents/s port needs at least
  80 MHz with this handshake. The absolute rates above depend on the 50 MHz
  and the receiver assumed here.

## What follows the original and what is this design's own

The following come from the original design:

* the two architectures and their block structure;
* the MSM state machines (states, the bit-by-bit test, ROM lookup, return to
  IDLE after the last bit);
* the handshake states and REQ levels;
* two lines per neuron in the MSM;
* the 16-bit events and the 1024 × 16 AER FIFOs;
* four DSM modules on consecutive quarters of the input.

The following are this design's own choices:

* **Sizes.** 16 neurons (32 lines) for both monitors. The original only says
  the monitors are generic. Spikes FIFO and partial FIFO depth of 16; their
  depths are not given.
* **FIFO behaviour.** All FIFOs are first-word-fall-through. The state
  diagram re-reads the FIFO output during the scan, but here the word is
  captured once, in READ_SPIKES. The diagram labels the FIFO flag as leaving
  IDLE on `EMPTY=1`, whereas the prose says "when the FIFO is not empty".
  The RTL follows the prose.
* **Address map.** The ROM holds `ADDR_BASE + i`; its contents are not given.
* **DSM details.** The pending-register policy of the DSM scanner, and the
  round-robin merge with its address formula.
* **Back-pressure.** Both scanners wait on a full downstream FIFO instead of
  dropping.
* **Port and reset.** The ACK synchroniser; asynchronous active-low reset.
* **Added ports.** `lost_count` on each monitor (`msm_lost` / `dsm_lost` on
  the top), so the loss ratio can be measured inside the FPGA.

Not provided: the test infrastructure of the original study. This covers the
USB/SRAM stimulus player on the FPGA, the SRAM, the USB microcontroller and
the USB event logger. The testbenches generate spikes directly and log events
with `tb/aer_receiver.sv`.

## Files

| file | contents |
|------|----------|
| `rtl/spike_mon_pkg.sv` | event width, AER FIFO depth, state enums |
| `rtl/sync_fifo.sv` | show-ahead FIFO used everywhere |
| `rtl/mapping_rom.sv`, `rtl/spikes2aer_fsm.sv`, `rtl/msm.sv` | MSM |
| `rtl/spikes_scan_fsm.sv`, `rtl/dsm_module.sv`, `rtl/merge_aer_fsm.sv`, `rtl/dsm.sv` | DSM |
| `rtl/aer_handshake_fsm.sv` | 4-phase output port |
| `rtl/spikes_monitors_top.sv` | both monitors on one spike input |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/aer_receiver.sv` | behavioural AER event logger with protocol checks |

Top-level parameters: `N_NEURONS` (16; gives W = 2·N_NEURONS lines),
`SPIKES_FIFO_DEPTH` (16), `PARTIAL_FIFO_DEPTH` (16), `AER_DEPTH` (1024).
FIFO depths must be powers of two, and W must be a multiple of 4 with
W/4 ≥ 2.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, the full design at its default sizes:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_spikes_monitors_top rtl/spike_mon_pkg.sv tb/tb_spikes_monitors_top.sv
./obj_dir/Vtb_spikes_monitors_top
```

This run takes well under a second. Replace the top module name to run any
other testbench. The testbenches of `msm`, `dsm` and the DSM pieces use
reduced sizes (8 or 16 lines, FIFOs of 4 to 16 words) so that overflow happens
quickly. The top-level testbench reads internal FIFO-full flags through
hierarchical names to count how often each mechanism occurred. It fails if a
mechanism never occurred: simultaneous spikes, a Spikes FIFO overflow, a DSM
merge loss, a full AER FIFO in each monitor, an MSM scanner stall, or a full
DSM partial FIFO.
