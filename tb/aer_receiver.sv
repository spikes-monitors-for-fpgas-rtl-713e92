// aer_receiver: behavioural AER event logger used by the testbenches.
//
// Plays the receiving side of the 4-phase active-low handshake: when it sees
// REQ low it waits a random 0..DELAY_MAX cycles, samples the address
// (reported as a one-cycle pulse on got / got_data), pulls ACK low, waits for
// REQ to return high, waits again 0..DELAY_MAX cycles and releases ACK. It
// also checks the sender's side of the protocol: the data lines must be
// driven (oe high) and stable for as long as REQ is low, and REQ must not
// rise before ACK has fallen. Each violation increments protocol_errors.
// With DELAY_MAX = 0 the receiver answers on the clock edge after it sees
// REQ change.
module aer_receiver #(
  parameter int unsigned DELAY_MAX = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_n,
  input  logic [15:0] data,
  input  logic        oe,
  output logic        ack_n,
  output logic        got,
  output logic [15:0] got_data,
  output int unsigned protocol_errors,
  output longint unsigned n_events
);

  int unsigned wait_cnt;
  logic [15:0] held;
  typedef enum logic [1:0] {R_IDLE, R_WAIT_REQ_DELAY, R_ACKED, R_WAIT_REL_DELAY} r_state_t;
  r_state_t st;

  function automatic int unsigned rnd_delay();
    return (DELAY_MAX == 0) ? 0 : ($urandom % (DELAY_MAX + 1));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; ack_n <= 1'b1; got <= 1'b0; got_data <= '0;
      protocol_errors <= 0; n_events <= 0; wait_cnt <= 0; held <= '0;
    end else begin
      got <= 1'b0;
      if (!req_n && !oe) protocol_errors <= protocol_errors + 1;
      unique case (st)
        R_IDLE: if (!req_n) begin
          held <= data;
          wait_cnt <= rnd_delay();
          st <= R_WAIT_REQ_DELAY;
        end
        R_WAIT_REQ_DELAY: begin
          if (req_n || data != held) protocol_errors <= protocol_errors + 1;
          if (wait_cnt == 0) begin
            ack_n <= 1'b0; got <= 1'b1; got_data <= data;
            n_events <= n_events + 1;
            st <= R_ACKED;
          end else wait_cnt <= wait_cnt - 1;
        end
        R_ACKED: begin
          if (!req_n && data != held) protocol_errors <= protocol_errors + 1;
          if (req_n) begin
            wait_cnt <= rnd_delay();
            st <= R_WAIT_REL_DELAY;
          end
        end
        R_WAIT_REL_DELAY: begin
          if (!req_n) protocol_errors <= protocol_errors + 1;
          if (wait_cnt == 0) begin
            ack_n <= 1'b1;
            st <= R_IDLE;
          end else wait_cnt <= wait_cnt - 1;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
