// tb_sn_adder: self-checking test of the serial weighted-input adder.
// Runs random pulse cycles of N terms (random weights, random active
// synapses, extreme weights included) and compares the sum with the sum the
// testbench computes.
module tb_sn_adder;
  localparam int N  = 16;
  localparam int WW = 8;
  localparam int SW = WW + $clog2(N) + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, add_en = 1'b0;
  logic signed [WW-1:0] weight = '0;
  logic signed [SW-1:0] sum;
  int checks = 0, failures = 0;

  sn_adder #(.N_SYN(N), .W_W(WW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 500; p++) begin
      model = 0;
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        start  = (i == 0);
        add_en = (p % 50 == 1) ? 1'b1 : 1'($urandom_range(0, 1));
        case (p % 50)
          1: weight = -128;
          2: weight = 127;
          default: weight = WW'($urandom());
        endcase
        if (p % 50 == 2) add_en = 1'b1;
        if (add_en) model += int'(weight);
      end
      @(negedge clk);
      start = 1'b0; add_en = 1'b0;
      checks++;
      if (int'(sum) != model) begin
        failures++;
        $display("pulse %0d: sum=%0d expected %0d", p, sum, model);
      end
      // idle clocks with add_en low must not change the sum
      @(negedge clk);
      checks++;
      if (int'(sum) != model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
