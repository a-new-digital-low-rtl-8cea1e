// tb_sn_activation_curves: measures the three activation functions of the
// full-size neuron (all parameters at their defaults).
// With every synapse unconnected and the first leak LT+1 = 256 pulse cycles
// away, the membrane potential stays at the loaded V0, so the output spike
// rate over NP pulse cycles samples the activation function at v = V0 + theta.
// The measured rates are compared with
//   Identity: p = clamp(v / 65536, 0, 1)
//   Binary:   p = (v > 0)
//   Sigmoid:  p = Phi(v / sigma), sigma^2 = 8 * (2^13)^2 / 12, the normal
//             distribution function that the sum of eight uniform numbers
//             approximates
// within four binomial standard deviations plus 0.02. Each curve must also
// be non-decreasing in v (within the same margin).
module tb_sn_activation_curves;
  import sn_pkg::*;
  localparam int N  = 16;
  localparam int YW = 20;
  localparam int AW = $clog2(N + NUM_PAR);
  localparam int NP = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0, load_v0 = 1'b0, pulse_tick = 1'b0;
  logic [AW-1:0] cfg_addr = '0;
  logic [CFG_W-1:0] cfg_wdata = '0;
  logic [N-1:0] spike_in = '0;
  logic spike_out, done, busy, leak_event, sat_event, stall;
  logic signed [YW-1:0] membrane;
  int checks = 0, failures = 0;

  spiking_neuron dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  task automatic cfg(input int addr, input int data);
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_addr = AW'(addr);
    cfg_wdata = CFG_W'(data);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // standard normal distribution function by Simpson integration
  function automatic real phi(input real z);
    real a = (z < 0.0) ? -z : z;
    real h, s, x;
    int n = 200;
    h = a / n;
    s = 0.0;
    for (int k = 0; k <= n; k++) begin
      x = k * h;
      s += ((k == 0 || k == n) ? 1.0 : ((k % 2 == 1) ? 4.0 : 2.0)) * $exp(-x * x / 2.0);
    end
    s = s * h / 3.0 / $sqrt(2.0 * 3.14159265358979);
    return (z < 0.0) ? 0.5 - s : 0.5 + s;
  endfunction

  // rate over NP pulse cycles with Y = v0
  task automatic measure(input int v0, output real rate);
    int fires = 0;
    cfg(N + PAR_V0, v0);
    @(negedge clk);
    load_v0 = 1'b1;
    @(negedge clk);
    load_v0 = 1'b0;
    for (int k = 0; k < NP; k++) begin
      @(negedge clk);
      pulse_tick = 1'b1;
      @(negedge clk);
      pulse_tick = 1'b0;
      while (!done) @(negedge clk);
      if (spike_out) fires++;
    end
    chk(int'(membrane) == v0, $sformatf("membrane %0d stayed at V0 %0d", membrane, v0));
    rate = real'(fires) / NP;
  endtask

  initial begin
    static int vs [] = '{-30000, -12000, -6000, -2000, 0, 2000, 6000, 12000, 20000, 32000};
    int bias;
    real rate, p, tol, prev;
    static real sigma = $sqrt(8.0 * 8192.0 * 8192.0 / 12.0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // no synapse connected (reset state); no leak for 256 pulse cycles
    cfg(N + PAR_LF, 3);
    cfg(N + PAR_LP, 255);
    cfg(N + PAR_LT, 255);
    for (int af = 0; af < 3; af++) begin
      cfg(N + PAR_AF, af);
      prev = 0.0;
      for (int i = 0; i < vs.size(); i++) begin
        // the bias takes part: split v between V0 and theta
        bias = (i % 2 == 1) ? 1000 : -1000;
        cfg(N + PAR_BIAS, bias);
        measure(vs[i] - bias, rate);
        case (af)
          0: p = (vs[i] <= 0) ? 0.0 : (vs[i] >= 65535 ? 1.0 : real'(vs[i]) / 65536.0);
          1: p = (vs[i] > 0) ? 1.0 : 0.0;
          default: p = phi(real'(vs[i]) / sigma);
        endcase
        tol = 4.0 * $sqrt(p * (1.0 - p) / NP) + 0.02;
        $display("AF=%0d v=%6d rate=%.3f expected %.3f", af, vs[i], rate, p);
        chk(rate >= p - tol && rate <= p + tol, $sformatf("AF=%0d v=%0d rate %.3f expected %.3f", af, vs[i], rate, p));
        chk(rate >= prev - 0.12, $sformatf("AF=%0d rate not monotonic at v=%0d", af, vs[i]));
        prev = rate;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
