// tb_spiking_neuron: end-to-end test of the spiking neuron at a reduced
// size of 4 synapses, so that the fire step must wait for the random number
// generator (its 8-clock draw is longer than the 4-clock iteration).
// The scenario and its checks are in sn_e2e_scenario.svh.
module tb_spiking_neuron;
  import sn_pkg::*;
  import sn_ref_pkg::*;
  localparam int N  = 4;
  localparam int YW = 20;
  localparam logic [31:0] SEED = 32'h2545_F491;
  localparam int AW = $clog2(N + NUM_PAR);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0, load_v0 = 1'b0, pulse_tick = 1'b0;
  logic [AW-1:0] cfg_addr = '0;
  logic [CFG_W-1:0] cfg_wdata = '0;
  logic [N-1:0] spike_in = '0;
  logic spike_out, done, busy, leak_event, sat_event, stall;
  logic signed [YW-1:0] membrane;

  spiking_neuron #(.N_SYN(N)) dut (.*);

`include "sn_e2e_scenario.svh"

endmodule
