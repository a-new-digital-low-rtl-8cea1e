// sn_synapse_latch: the synapse flip-flops of the neuron.
//
// Each axon input has a sticky "pending" flop that records any spike seen
// since the last snapshot. On capture (the first clock of a pulse cycle) the
// pending bits, ORed with spikes arriving in that very clock, are copied into
// the snapshot register ff and pending is cleared. The adder reads ff, the
// binary synaptic inputs S_i(t) of the pulse cycle, while spikes that arrive
// during processing collect in pending for the next pulse cycle.
// Sampling each axon spike in a flop follows the neuron's description; the
// pending/snapshot split is this design's choice.
//
// Timing: ff is valid the clock after capture and holds until the next one.
module sn_synapse_latch #(
  parameter int unsigned N_SYN = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SYN-1:0] spike_in,
  input  logic             capture,
  output logic [N_SYN-1:0] ff
);

  logic [N_SYN-1:0] pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      ff      <= '0;
    end else if (capture) begin
      ff      <= pending | spike_in;
      pending <= '0;
    end else begin
      pending <= pending | spike_in;
    end
  end

endmodule
