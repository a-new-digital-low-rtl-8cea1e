// tb_sn_leaky_integrator: self-checking test of the membrane integrator.
// Part 1 compares Y, leak_event and sat_event with a reference model over
// random parameters and input sums (saturation included). The model divides
// with floor rounding instead of shifting.
// Part 2 checks the published laws: a leak every LP+1 pulse cycles, the
// steady-state gain 2^(2LF)(1+LP) (LF<3) or 2^(2LF-3)(1+LP) (LF>2) for a
// constant input, and the time constant 2^LF (1+LP) pulse cycles of the
// decay once the input stops.
module tb_sn_leaky_integrator;
  import sn_pkg::*;
  localparam int YW = 20;
  localparam int SW = 13;
  localparam longint YMAX = (64'sd1 <<< (YW - 1)) - 1;
  localparam longint YMIN = -(64'sd1 <<< (YW - 1));
  logic clk = 1'b0, rst_n = 1'b0;
  logic load_v0 = 1'b0, update = 1'b0;
  logic signed [SW-1:0] sum = '0;
  logic [LF_W-1:0] lf = '0;
  logic [LP_W-1:0] lp = '0, lt = '0;
  logic signed [V0_W-1:0] v0 = '0;
  logic signed [YW-1:0] y;
  logic leak_event, sat_event;
  int checks = 0, failures = 0;
  longint my;
  int mtimer;

  sn_leaky_integrator #(.Y_W(YW), .S_W(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floordiv(longint a, int sh);
    longint d = 64'sd1 <<< sh;
    longint q = a / d;
    if (a < 0 && q * d != a) q -= 1;
    return q;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic do_load();
    @(negedge clk);
    load_v0 = 1'b1;
    @(negedge clk);
    load_v0 = 1'b0;
    my = longint'(v0);
    mtimer = int'(lt);
  endtask

  // one pulse-cycle update, checked against the model
  task automatic do_update(input int s);
    longint a;
    bit leak, sat;
    int sh;
    @(negedge clk);
    sum = SW'(s);
    update = 1'b1;
    @(negedge clk);
    update = 1'b0;
    sh = (lf < 3) ? int'(lf) : int'(lf) - 3;
    a = my + longint'(s) * (64'sd1 <<< sh);
    sat = (a > YMAX) || (a < YMIN);
    if (a > YMAX) a = YMAX;
    if (a < YMIN) a = YMIN;
    leak = (mtimer == 0);
    if (leak) begin
      a = a - floordiv(a, int'(lf));
      mtimer = int'(lp);
    end else begin
      mtimer--;
    end
    my = a;
    chk(longint'(y) == my, $sformatf("y=%0d expected %0d", y, my));
    chk(leak_event == leak, "leak_event");
    chk(sat_event == sat, "sat_event");
  endtask

  initial begin
    int leaks, ups, expected_gain, x;
    longint y0, target;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Part 1: random
    for (int r = 0; r < 300; r++) begin
      lf = LF_W'($urandom());
      lp = LP_W'($urandom_range(0, 4));
      lt = LP_W'($urandom_range(0, 4));
      v0 = V0_W'($urandom());
      do_load();
      chk(longint'(y) == my, "load_v0");
      for (int k = 0; k < 40; k++) begin
        if (r % 10 == 0) x = (r % 20 == 0) ? 4095 : -4096;  // drive into saturation
        else x = $urandom_range(0, 8191) - 4096;
        do_update(x);
      end
    end
    // Part 2a: leak period and steady-state gain
    for (int l = 1; l < 8; l++) begin
      for (int p = 0; p < 3; p++) begin
        lf = LF_W'(l); lp = LP_W'(p); lt = '0; v0 = '0;
        do_load();
        x = 50;
        leaks = 0; ups = 0;
        for (int k = 0; k < 40 * (1 << l) * (p + 1); k++) begin
          do_update(x);
          ups++;
          if (leak_event) leaks++;
        end
        chk(leaks == (ups + p) / (p + 1), $sformatf("LF=%0d LP=%0d: %0d leaks in %0d", l, p, leaks, ups));
        expected_gain = (l > 2) ? (1 << (2 * l - 3)) * (1 + p) : (1 << (2 * l)) * (1 + p);
        target = longint'(x) * expected_gain;
        // quantisation of the leak and the sawtooth between leaks
        // Y is sampled after the leak, i.e. up to a factor (1 - 2^-LF) below
        // the peak value the gain law describes.
        chk((longint'(y) >= target - (target >>> l) - (1 << l) - 2) && (longint'(y) <= target + longint'(x) * (1 << ((l < 3) ? l : l - 3)) * (longint'(p) + 64'sd1) + 2),
            $sformatf("LF=%0d LP=%0d gain: y=%0d target=%0d", l, p, y, target));
        // Part 2b: decay time constant 2^LF (1+LP): after that many pulse
        // cycles without input, Y has fallen to about 1/e (0.37) of its value
        y0 = longint'(y);
        for (int k = 0; k < (1 << l) * (p + 1); k++) do_update(0);
        if (l >= 3) chk((longint'(y) * 100 >= y0 * 30) && (longint'(y) * 100 <= y0 * 42),
            $sformatf("LF=%0d LP=%0d decay: %0d -> %0d", l, p, y0, y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
