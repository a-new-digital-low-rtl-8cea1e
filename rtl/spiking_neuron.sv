// spiking_neuron: reconfigurable digital spiking neuron (leaky integrate and
// fire with stochastic activation).
//
// Per pulse cycle (started by pulse_tick) the neuron computes
//   Y(t) = alpha * (Y(t-1) + g * sum_i S_i(t) W_i),   alpha = 1 - 2^-LF,
// where S_i(t) is 1 when axon i spiked and its synapse is connected, the
// leak (alpha) is applied only once every LP+1 pulse cycles and g is the
// gain shift 2^LF (LF < 3) or 2^(LF-3) (LF > 2), and fires when
// Y + theta exceeds a random threshold chosen by the activation function:
// a uniform number (Identity), zero (Binary) or the centred sum of eight
// uniform numbers (Sigmoid). No multipliers are used.
//
// Blocks: sn_synapse_latch (axon spike flops), sn_memory (weights and
// parameters), sn_adder (serial weighted sum), sn_leaky_integrator (Y
// register, leak, leakage timer), sn_rng (random numbers), sn_activation
// (comparator) and sn_controller (sequencing).
//
// Interface:
//   cfg_we/cfg_addr/cfg_wdata  write weight i (low W_W bits) and its
//                              connection bit (bit 15) at address i, the
//                              parameters at N_SYN + sn_pkg::PAR_* (one word
//                              per clock).
//   load_v0                    load Y with V0 and the leakage timer with LT.
//   pulse_tick                 start a pulse cycle (ignored while busy).
//   spike_in[i]                axon spikes, any time; each is counted once,
//                              in the next pulse cycle that starts.
//   spike_out, done            one-clock pulses N_SYN+3 clocks after
//                              pulse_tick (for N_SYN >= 7).
//   membrane                   the Y register.
//   leak_event, sat_event,     one-clock indications that a leak was
//   stall                      applied, Y saturated, or the fire step waited
//                              for the random number generator.
// The structure (adder, leaky integrator, random generator, comparator,
// memory unit) follows the neuron's description; widths, the address map,
// the handshake and the timing are this design's choices.
module spiking_neuron
  import sn_pkg::*;
#(
  parameter int unsigned N_SYN = 16,
  parameter int unsigned W_W   = 8,
  parameter int unsigned Y_W   = 20,
  parameter int unsigned RNG_W = 16,
  parameter logic [31:0] SEED  = 32'h2545_F491,
  localparam int unsigned AW   = $clog2(N_SYN + NUM_PAR)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [AW-1:0]         cfg_addr,
  input  logic [CFG_W-1:0]      cfg_wdata,
  input  logic                  load_v0,
  input  logic                  pulse_tick,
  input  logic [N_SYN-1:0]      spike_in,
  output logic                  spike_out,
  output logic                  done,
  output logic                  busy,
  output logic signed [Y_W-1:0] membrane,
  output logic                  leak_event,
  output logic                  sat_event,
  output logic                  stall
);

  localparam int unsigned IW  = $clog2(N_SYN);
  localparam int unsigned S_W = W_W + $clog2(N_SYN) + 1;

  logic [N_SYN-1:0]        ff;
  logic                    capture, rng_start, acc_en, first, integ_update, fire_en;
  logic [IW-1:0]           idx;
  logic signed [W_W-1:0]   weight;
  logic signed [S_W-1:0]   sum;
  sn_params_t              params;
  logic [RNG_W-1:0]        uni;
  logic signed [RNG_W-1:0] gauss;
  logic                    rng_valid, fire, connected;

  sn_synapse_latch #(.N_SYN(N_SYN)) u_syn (
    .clk, .rst_n, .spike_in, .capture, .ff
  );

  sn_memory #(.N_SYN(N_SYN), .W_W(W_W)) u_mem (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .rd_idx(idx), .rd_weight(weight), .rd_connected(connected), .params
  );

  sn_controller #(.N_SYN(N_SYN)) u_ctl (
    .clk, .rst_n, .pulse_tick, .rng_valid, .capture, .rng_start, .idx,
    .acc_en, .first, .integ_update, .fire_en, .stall, .busy
  );

  sn_adder #(.N_SYN(N_SYN), .W_W(W_W)) u_add (
    .clk, .rst_n, .start(first), .add_en(acc_en && ff[idx] && connected), .weight, .sum
  );

  sn_leaky_integrator #(.Y_W(Y_W), .S_W(S_W)) u_int (
    .clk, .rst_n, .load_v0, .update(integ_update), .sum,
    .lf(params.lf), .lp(params.lp), .lt(params.lt), .v0(params.v0),
    .y(membrane), .leak_event, .sat_event
  );

  sn_rng #(.RNG_W(RNG_W), .SEED(SEED)) u_rng (
    .clk, .rst_n, .start(rng_start), .uni, .gauss, .valid(rng_valid)
  );

  sn_activation #(.Y_W(Y_W), .RNG_W(RNG_W)) u_act (
    .af(params.af), .y(membrane), .bias(params.bias), .uni, .gauss, .fire
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spike_out <= 1'b0;
      done      <= 1'b0;
    end else begin
      spike_out <= fire_en && fire;
      done      <= fire_en;
    end
  end

`ifndef SYNTHESIS
  // A configuration write during a pulse cycle would change weights or
  // parameters half-way through it.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !cfg_we)
    else $error("spiking_neuron: configuration write while busy");
`endif

endmodule
