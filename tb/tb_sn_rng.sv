// tb_sn_rng: self-checking test of the random number generator.
// Checks the 8-clock draw latency and the valid handshake, compares uni and
// gauss with the testbench's own xorshift32 model, and checks the statistics:
// uni uniform (mean 2^15, each quarter of the range hit about equally often),
// gauss centred on zero with the variance of a sum of eight uniform numbers,
// 8 * (2^13)^2 / 12.
module tb_sn_rng;
  localparam int RW = 16;
  localparam logic [31:0] SEED = 32'h2545_F491;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [RW-1:0] uni;
  logic signed [RW-1:0] gauss;
  logic valid;
  int checks = 0, failures = 0;
  logic [31:0] ms = SEED;

  sn_rng #(.RNG_W(RW), .SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] xs(input logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  initial begin
    int lat, mu, mg, quarter [4];
    real sum_u, sum_g, sum_g2, mean_g, var_g, var_exp;
    localparam int NDRAW = 4000;
    sum_u = 0; sum_g = 0; sum_g2 = 0;
    foreach (quarter[q]) quarter[q] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < NDRAW; d++) begin
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      chk(!valid, "valid cleared by start");
      while (!valid && lat < 50) begin
        @(negedge clk);
        lat++;
      end
      chk(lat == 9, $sformatf("latency %0d clocks, expected 9", lat));
      // model: eight steps
      mg = 0;
      for (int k = 0; k < 8; k++) begin
        ms = xs(ms);
        mg += int'(ms[RW-4:0]);
      end
      mu = int'(ms[31 -: RW]);
      mg -= (1 << (RW - 1));
      chk(int'(uni) == mu, $sformatf("uni=%0d expected %0d", uni, mu));
      chk(int'(gauss) == mg, $sformatf("gauss=%0d expected %0d", gauss, mg));
      sum_u += real'(uni);
      sum_g += real'(gauss);
      sum_g2 += real'(gauss) * real'(gauss);
      quarter[uni[RW-1 -: 2]]++;
      // outputs hold while idle
      repeat ($urandom_range(0, 3)) @(negedge clk);
      chk(valid && int'(uni) == mu && int'(gauss) == mg, "outputs held");
    end
    mean_g = sum_g / NDRAW;
    var_g = sum_g2 / NDRAW - mean_g * mean_g;
    var_exp = 8.0 * (8192.0 * 8192.0) / 12.0;
    chk(sum_u / NDRAW > 31000.0 && sum_u / NDRAW < 34500.0, $sformatf("uni mean %f", sum_u / NDRAW));
    foreach (quarter[q]) chk(quarter[q] > NDRAW / 4 - 200 && quarter[q] < NDRAW / 4 + 200, $sformatf("quarter %0d: %0d", q, quarter[q]));
    chk(mean_g > -600.0 && mean_g < 600.0, $sformatf("gauss mean %f", mean_g));
    chk(var_g > 0.85 * var_exp && var_g < 1.15 * var_exp, $sformatf("gauss variance %f expected %f", var_g, var_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
