// sn_memory: the neuron's internal memory unit.
//
// Holds the N_SYN signed synaptic weights at addresses 0..N_SYN-1 and, right
// after them, the neuron parameters (see sn_pkg for their offsets). One
// configuration word is written per clock through cfg_we/cfg_addr/cfg_wdata;
// a weight is stored from the low W_W bits of the word together with the
// synapse's connection bit S_ij (bit SYN_CON_BIT), a parameter from as many
// low bits as it has. Writes to addresses past the last parameter are
// ignored. The weight of synapse rd_idx is read asynchronously, one per clock
// during the adder's iteration, with its connection bit on rd_connected; the
// parameters are always visible on params.
// Keeping weights and parameters together in one memory follows the neuron's
// description; the address map, the write port and the parameter reset values
// (Identity, LF=LP=LT=0, bias=V0=0, all synapses unconnected) are this
// design's choices. The weights are a plain array without reset; a synapse
// takes part only once its word has been written with S_ij = 1.
module sn_memory
  import sn_pkg::*;
#(
  parameter int unsigned N_SYN = 16,
  parameter int unsigned W_W   = 8,
  localparam int unsigned AW   = $clog2(N_SYN + NUM_PAR),
  localparam int unsigned IW   = $clog2(N_SYN)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [AW-1:0]         cfg_addr,
  input  logic [CFG_W-1:0]      cfg_wdata,
  input  logic [IW-1:0]         rd_idx,
  output logic signed [W_W-1:0] rd_weight,
  output logic                  rd_connected,
  output sn_params_t            params
);

  logic signed [W_W-1:0] weights [N_SYN];
  logic [N_SYN-1:0]      connected;

  always_ff @(posedge clk) begin
    if (cfg_we && (32'(cfg_addr) < N_SYN))
      weights[cfg_addr[IW-1:0]] <= cfg_wdata[W_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      connected <= '0;
    else if (cfg_we && (32'(cfg_addr) < N_SYN))
      connected[cfg_addr[IW-1:0]] <= cfg_wdata[SYN_CON_BIT];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      params <= '{af: AF_IDENTITY, lf: '0, lp: '0, lt: '0, bias: '0, v0: '0};
    end else if (cfg_we) begin
      case (32'(cfg_addr))
        N_SYN + PAR_AF:   params.af   <= af_e'(cfg_wdata[1:0]);
        N_SYN + PAR_LF:   params.lf   <= cfg_wdata[LF_W-1:0];
        N_SYN + PAR_LP:   params.lp   <= cfg_wdata[LP_W-1:0];
        N_SYN + PAR_LT:   params.lt   <= cfg_wdata[LP_W-1:0];
        N_SYN + PAR_BIAS: params.bias <= cfg_wdata[BIAS_W-1:0];
        N_SYN + PAR_V0:   params.v0   <= cfg_wdata[V0_W-1:0];
        default: ;
      endcase
    end
  end

  assign rd_weight    = weights[rd_idx];
  assign rd_connected = connected[rd_idx];

endmodule
