// tb_sn_activation: self-checking test of the activation comparator.
// Random and edge-case membrane, bias and random-number values for all four
// activation codes, compared with the decision rules computed in integers.
module tb_sn_activation;
  import sn_pkg::*;
  localparam int YW = 20;
  localparam int RW = 16;
  af_e af;
  logic signed [YW-1:0] y;
  logic signed [BIAS_W-1:0] bias;
  logic [RW-1:0] uni;
  logic signed [RW-1:0] gauss;
  logic fire;
  int checks = 0, failures = 0;
  int fires [4];

  sn_activation #(.Y_W(YW), .RNG_W(RW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    bit exp_fire;
    foreach (fires[k]) fires[k] = 0;
    for (int i = 0; i < 40000; i++) begin
      af    = af_e'(i % 4);
      case ((i / 4) % 4)
        0: y = YW'($urandom());
        1: y = YW'($urandom_range(0, 200)) - YW'(100);
        2: y = (i % 8 < 4) ? {1'b0, {(YW-1){1'b1}}} : {1'b1, {(YW-1){1'b0}}};
        default: y = YW'($urandom_range(0, 70000));
      endcase
      bias  = ((i / 16) % 2 == 0) ? BIAS_W'($urandom()) : BIAS_W'($urandom_range(0, 20)) - BIAS_W'(10);
      uni   = RW'($urandom());
      gauss = ((i / 32) % 3 == 0) ? RW'($urandom_range(0, 40)) - RW'(20) : RW'($urandom());
      if (i % 97 == 0) begin  // exact tie: random equal to Y + bias
        bias = '0;
        y = YW'($urandom_range(0, 1000));
        uni = RW'(y);
        gauss = RW'(y);
      end
      #1;
      v = longint'(y) + longint'(bias);
      case (i % 4)
        0: exp_fire = v > longint'(uni);
        1: exp_fire = v > 0;
        2: exp_fire = v > longint'(gauss);
        default: exp_fire = 1'b0;
      endcase
      checks++;
      if (fire !== exp_fire) begin
        failures++;
        if (failures < 20) $display("FAIL af=%0d y=%0d bias=%0d uni=%0d gauss=%0d fire=%0d", i % 4, y, bias, uni, gauss, fire);
      end
      if (fire) fires[i % 4]++;
      #1;
    end
    // every active function fired sometimes and was silent sometimes
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (fires[k] == 0 || fires[k] == 10000) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
