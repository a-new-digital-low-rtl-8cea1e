// sn_controller: sequences one pulse cycle of the neuron.
//
// States and the clock they take, counting the pulse_tick clock as 0:
//   IDLE  waits for pulse_tick; in that clock it snapshots the synapse
//         latches (capture) and starts the random number generator.
//   ACC   clocks 1..N_SYN: presents synapse index idx = 0..N_SYN-1 to the
//         memory unit and the adder (first asserted on index 0).
//   INTEG clock N_SYN+1: the integrator adds the weighted sum and leaks.
//   FIRE  clock N_SYN+2 or later: waits for rng_valid (a stall, only when
//         N_SYN < 7), then asserts fire_en so the spike decision is
//         registered; done and spike_out appear in the following clock.
// A pulse_tick that arrives while busy is ignored; the spikes of that period
// stay in the synapse latches. This iterative flow follows the neuron's
// operation description; the state encoding and timing are this design's.
module sn_controller #(
  parameter int unsigned N_SYN = 16,
  localparam int unsigned IW   = $clog2(N_SYN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pulse_tick,
  input  logic          rng_valid,
  output logic          capture,
  output logic          rng_start,
  output logic [IW-1:0] idx,
  output logic          acc_en,
  output logic          first,
  output logic          integ_update,
  output logic          fire_en,
  output logic          stall,
  output logic          busy
);

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_INTEG, S_FIRE} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (pulse_tick) begin
          state <= S_ACC;
          idx   <= '0;
        end
        S_ACC: begin
          if (32'(idx) == N_SYN - 1) state <= S_INTEG;
          else                       idx   <= idx + 1'b1;
        end
        S_INTEG: state <= S_FIRE;
        S_FIRE:  if (rng_valid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    capture      = (state == S_IDLE) && pulse_tick;
    rng_start    = capture;
    acc_en       = (state == S_ACC);
    first        = acc_en && (idx == '0);
    integ_update = (state == S_INTEG);
    fire_en      = (state == S_FIRE) && rng_valid;
    stall        = (state == S_FIRE) && !rng_valid;
    busy         = (state != S_IDLE);
  end

endmodule
