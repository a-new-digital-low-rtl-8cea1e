// tb_sn_memory: self-checking test of the neuron memory unit.
// Checks the parameter and connection-bit reset values, writes random weights and parameters
// (including writes past the last address, which must be ignored), and
// reads every weight and parameter back against a shadow copy.
module tb_sn_memory;
  import sn_pkg::*;
  localparam int N  = 16;
  localparam int WW = 8;
  localparam int AW = $clog2(N + NUM_PAR);
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [AW-1:0] cfg_addr = '0;
  logic [CFG_W-1:0] cfg_wdata = '0;
  logic [$clog2(N)-1:0] rd_idx = '0;
  logic signed [WW-1:0] rd_weight;
  logic rd_connected;
  sn_params_t params;
  int checks = 0, failures = 0;
  logic signed [WW-1:0] shadow [N];
  logic cshadow [N];
  logic [CFG_W-1:0] pshadow [NUM_PAR];

  sn_memory #(.N_SYN(N), .W_W(WW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input int a, input logic [CFG_W-1:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = AW'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
    if (a < N) begin
      shadow[a] = d[WW-1:0];
      cshadow[a] = d[SYN_CON_BIT];
    end
    else if (a < N + NUM_PAR) pshadow[a - N] = d;
  endtask

  task automatic check_params();
    chk(params.af   == af_e'(pshadow[PAR_AF][1:0]),        "af");
    chk(params.lf   == pshadow[PAR_LF][LF_W-1:0],          "lf");
    chk(params.lp   == pshadow[PAR_LP][LP_W-1:0],          "lp");
    chk(params.lt   == pshadow[PAR_LT][LP_W-1:0],          "lt");
    chk(params.bias == $signed(pshadow[PAR_BIAS]),         "bias");
    chk(params.v0   == $signed(pshadow[PAR_V0]),           "v0");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (pshadow[k]) pshadow[k] = '0;
    check_params();
    for (int i = 0; i < N; i++) begin
      rd_idx = $clog2(N)'(i);
      #1;
      chk(!rd_connected, "synapses unconnected after reset");
    end
    for (int round = 0; round < 20; round++) begin
      for (int k = 0; k < 60; k++) wr($urandom_range(0, (1 << AW) - 1), CFG_W'($urandom()));
      for (int i = 0; i < N; i++) wr(i, CFG_W'($urandom()));  // all weights defined
      for (int i = 0; i < N; i++) begin
        rd_idx = $clog2(N)'(i);
        #1;
        chk(rd_weight == shadow[i], $sformatf("weight %0d = %0d expected %0d", i, rd_weight, shadow[i]));
        chk(rd_connected == cshadow[i], $sformatf("synapse %0d connection bit", i));
      end
      check_params();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
