// sn_adder: serial weighted-input adder of the neuron.
//
// Spikes are binary, so the weighted input sum needs no multiplier: during
// the N_SYN iteration clocks of a pulse cycle the adder adds the weight of
// every synapse whose snapshot bit is set (add_en). On the first iteration
// clock (start) the register is loaded with that clock's term instead of
// being accumulated, which clears the previous pulse cycle's sum. The sum is
// S_W = W_W + clog2(N_SYN) + 1 bits wide, enough for N_SYN extreme weights,
// so it cannot overflow.
//
// Timing: sum reflects every term presented up to and including the previous
// clock. Summing only the inputs (and letting the integrator add Y(t-1))
// is this design's arrangement of the published "SUM = Y(t-1) + sum of
// weights" iteration.
module sn_adder #(
  parameter int unsigned N_SYN = 16,
  parameter int unsigned W_W   = 8,
  localparam int unsigned S_W  = W_W + $clog2(N_SYN) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  add_en,
  input  logic signed [W_W-1:0] weight,
  output logic signed [S_W-1:0] sum
);

  logic signed [S_W-1:0] term;

  assign term = add_en ? S_W'(weight) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sum <= '0;
    else if (start) sum <= term;
    else            sum <= sum + term;
  end

endmodule
