// spike_mon_pkg: constants and types shared by the two spike monitors.
//
// Both monitors turn single-cycle spike pulses into 16-bit Address-Event
// Representation (AER) words and send them over a 4-phase REQ/ACK bus.
// The 16-bit event width and the 1024-word AER FIFO follow the original
// design's block diagrams; the handshake state encoding is this design's own.
package spike_mon_pkg;

  // Width of one AER event (address word) on the output bus.
  localparam int unsigned AER_W = 16;

  // Depth of the output AER FIFO, in events.
  localparam int unsigned AER_FIFO_DEPTH = 1024;

  typedef logic [AER_W-1:0] aer_addr_t;

  // States of the 4-phase AER output handshake.
  typedef enum logic [1:0] {
    HS_IDLE      = 2'd0,  // REQ released, waiting for an event in the AER FIFO
    HS_READ_ADDR = 2'd1,  // pop the FIFO head and put it on the data lines
    HS_WAIT_ACK1 = 2'd2,  // REQ asserted (low), waiting for ACK to go low
    HS_WAIT_ACK2 = 2'd3   // REQ released, waiting for ACK to return high
  } hs_state_t;

  // States of the MSM word scanner (Spikes2AER FSM).
  typedef enum logic [1:0] {
    S2A_IDLE        = 2'd0,  // waiting for a snapshot in the Spikes FIFO
    S2A_READ_SPIKES = 2'd1,  // load the FIFO head into the scan register
    S2A_CHECK       = 2'd2   // test one bit per cycle
  } s2a_state_t;

endpackage
