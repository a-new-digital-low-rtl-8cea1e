// sn_activation: the neuron's comparator / activation function.
//
// The integrator value plus the bias, v = Y + theta, decides the spike:
//   Identity: fire when v > uni   (uni uniform on 0..2^RNG_W-1), so the spike
//             probability rises linearly from 0 at v <= 0 to 1 at
//             v >= 2^RNG_W - 1.
//   Binary:   fire when v > 0.
//   Sigmoid:  fire when v > gauss (gauss the centred sum of eight uniform
//             numbers), so the spike probability follows the distribution
//             function of an approximately Gaussian variable: 1/2 at v = 0.
//   Reserved code 3 never fires.
// The three functions and the strict "random < sum" test follow the neuron's
// description; adding the bias here rather than into Y is a reading of its
// operation flow ("the integrator output is added to a bias and compared").
// Purely combinational.
module sn_activation
  import sn_pkg::*;
#(
  parameter int unsigned Y_W   = 20,
  parameter int unsigned RNG_W = 16
) (
  input  af_e                       af,
  input  logic signed [Y_W-1:0]     y,
  input  logic signed [BIAS_W-1:0]  bias,
  input  logic [RNG_W-1:0]          uni,
  input  logic signed [RNG_W-1:0]   gauss,
  output logic                      fire
);

  localparam int unsigned V_W = ((Y_W > BIAS_W) ? Y_W : BIAS_W) + 2;
  localparam int unsigned C_W = (V_W > RNG_W + 1) ? V_W : RNG_W + 1;

  localparam logic signed [C_W-1:0] ZERO = '0;

  logic signed [C_W-1:0] v, u, g;

  always_comb begin
    v = C_W'(y) + C_W'(bias);
    u = C_W'({1'b0, uni});
    g = C_W'(gauss);
    unique case (af)
      AF_IDENTITY: fire = v > u;
      AF_BINARY:   fire = v > ZERO;
      AF_SIGMOID:  fire = v > g;
      default:     fire = 1'b0;
    endcase
  end

endmodule
