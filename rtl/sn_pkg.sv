// sn_pkg: types and constants shared by the spiking-neuron blocks.
//
// The neuron is configured through a small memory unit: N_SYN signed
// synaptic weights at addresses 0..N_SYN-1, followed by NUM_PAR parameter
// words (activation function, leakage factor LF, leakage period LP, leakage
// timer start LT, bias theta and reset potential V0), in that order. A weight
// word also carries the synapse's connection bit S_ij in its top bit. The
// parameter set and the activation-function codes (0 Identity, 1 Binary,
// 2 Sigmoid) are the neuron's published ones; the word widths and the order
// of the parameter words are this design's choice.
package sn_pkg;

  // Width of one configuration word on the write port.
  localparam int unsigned CFG_W  = 16;
  // Leakage factor: number of right shifts, 0..7.
  localparam int unsigned LF_W   = 3;
  // Leakage period and leakage-timer start value.
  localparam int unsigned LP_W   = 8;
  // Bias (theta) and reset potential (V0) widths.
  localparam int unsigned BIAS_W = 16;
  localparam int unsigned V0_W   = 16;

  // Activation function codes. Code 3 is reserved: the neuron never fires.
  typedef enum logic [1:0] {
    AF_IDENTITY = 2'd0,
    AF_BINARY   = 2'd1,
    AF_SIGMOID  = 2'd2,
    AF_RESERVED = 2'd3
  } af_e;

  typedef struct packed {
    af_e                       af;
    logic [LF_W-1:0]           lf;
    logic [LP_W-1:0]           lp;
    logic [LP_W-1:0]           lt;
    logic signed [BIAS_W-1:0]  bias;
    logic signed [V0_W-1:0]    v0;
  } sn_params_t;

  // In a weight word, this bit is the synapse value S_ij: 1 connects the
  // axon to the neuron, 0 leaves it unconnected whatever its weight.
  localparam int unsigned SYN_CON_BIT = CFG_W - 1;

  // Parameter word offsets, counted from address N_SYN.
  localparam int unsigned PAR_AF   = 0;
  localparam int unsigned PAR_LF   = 1;
  localparam int unsigned PAR_LP   = 2;
  localparam int unsigned PAR_LT   = 3;
  localparam int unsigned PAR_BIAS = 4;
  localparam int unsigned PAR_V0   = 5;
  localparam int unsigned NUM_PAR  = 6;

  // Input gain shift derived from the gain law
  //   Gain = 2^(2LF)   (1+LP)   for LF < 3
  //   Gain = 2^(2LF-3) (1+LP)   for LF > 2
  // The leak alone contributes 2^LF (1+LP); the rest is a left shift of the
  // pulse-cycle weighted sum by LF (LF < 3) or LF-3 (LF > 2).
  function automatic logic [LF_W-1:0] gain_shift(input logic [LF_W-1:0] lf);
    return (lf < LF_W'(3)) ? lf : lf - LF_W'(3);
  endfunction

endpackage
