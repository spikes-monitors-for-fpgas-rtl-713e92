// aer_handshake_fsm: 4-phase AER output port shared by both monitors.
//
// Takes addresses from the AER FIFO and sends each one over the AER bus with
// an active-low request / acknowledge pair:
//   IDLE      REQ high, data lines not driven (aer_oe low); leave when the
//             FIFO holds an event.
//   READ_ADDR pop the FIFO head onto the data lines, REQ still high (this
//             gives the receiver one cycle of data set-up).
//   WAIT_ACK1 REQ low, data held, until ACK goes low.
//   WAIT_ACK2 REQ high, data held, until ACK returns high; then IDLE.
// States, signal levels and transitions follow the original design's state
// diagram. The tri-state data bus of that diagram is represented by aer_data
// plus the drive enable aer_oe; the pad itself belongs to the chip top.
// ACK comes from another board, so it passes through a SYNC_STAGES flip-flop
// synchroniser (this design's addition) before the FSM looks at it.
//
// Timing: with a receiver that answers immediately, one event takes
// 4 + 2 x SYNC_STAGES clock cycles (8 cycles at the default), i.e. 6.25 M
// events/s at a 50 MHz clock.
module aer_handshake_fsm
  import spike_mon_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  // AER FIFO read side
  input  logic      fifo_empty,
  input  aer_addr_t fifo_data,
  output logic      fifo_rd,
  // AER bus
  output logic      aer_req_n,
  input  logic      aer_ack_n,
  output aer_addr_t aer_data,
  output logic      aer_oe
);

  hs_state_t state, state_nx;
  logic [SYNC_STAGES-1:0] ack_sync;
  logic ack_n_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_sync <= '1;
    else        ack_sync <= {ack_sync[SYNC_STAGES-2:0], aer_ack_n};
  end
  assign ack_n_s = ack_sync[SYNC_STAGES-1];

  always_comb begin
    state_nx = state;
    unique case (state)
      HS_IDLE:      if (!fifo_empty) state_nx = HS_READ_ADDR;
      HS_READ_ADDR: state_nx = HS_WAIT_ACK1;
      HS_WAIT_ACK1: if (!ack_n_s) state_nx = HS_WAIT_ACK2;
      HS_WAIT_ACK2: if (ack_n_s)  state_nx = HS_IDLE;
      default:      state_nx = HS_IDLE;
    endcase
  end

  assign fifo_rd = (state == HS_READ_ADDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= HS_IDLE;
      aer_req_n <= 1'b1;
      aer_oe    <= 1'b0;
      aer_data  <= '0;
    end else begin
      state     <= state_nx;
      // REQ comes straight from a flip-flop so it cannot glitch.
      aer_req_n <= (state_nx != HS_WAIT_ACK1);
      aer_oe    <= (state_nx != HS_IDLE);
      if (state == HS_IDLE && state_nx == HS_READ_ADDR) aer_data <= fifo_data;
    end
  end

  // Data must not change while a request is pending.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !aer_req_n && $past(!aer_req_n) |-> $stable(aer_data));

  initial begin
    assert (SYNC_STAGES >= 2) else $error("aer_handshake_fsm: SYNC_STAGES must be >= 2");
  end

endmodule
