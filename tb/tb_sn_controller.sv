// tb_sn_controller: self-checking test of the pulse-cycle sequencer.
// For each pulse cycle it checks, clock by clock, the control outputs
// against the intended schedule: capture and rng_start with pulse_tick,
// N_SYN iteration clocks with idx = 0..N_SYN-1 and first on index 0, one
// integrate clock, then the fire clock, held back (stall) until rng_valid.
// pulse_tick during a pulse cycle must be ignored.
module tb_sn_controller;
  localparam int N  = 16;
  localparam int IW = $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0;
  logic pulse_tick = 1'b0, rng_valid = 1'b0;
  logic capture, rng_start, acc_en, first, integ_update, fire_en, stall, busy;
  logic [IW-1:0] idx;
  int checks = 0, failures = 0, stalls = 0, ignored = 0;

  sn_controller #(.N_SYN(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    int wait_clocks;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      @(negedge clk);
      chk(!busy && !capture, "idle before tick");
      rng_valid = 1'b0;
      pulse_tick = 1'b1;
      #1;
      chk(capture && rng_start && !busy, "capture with tick");
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        pulse_tick = ($urandom_range(0, 3) == 0);  // must be ignored
        if (pulse_tick) ignored++;
        #1;
        chk(busy && acc_en && int'(idx) == i && first == (i == 0) && !capture && !integ_update && !fire_en,
            $sformatf("iteration %0d: idx=%0d acc_en=%0d", i, idx, acc_en));
      end
      @(negedge clk);
      pulse_tick = 1'b0;
      #1;
      chk(integ_update && !acc_en && !fire_en && busy, "integrate clock");
      // random number ready now or a few clocks later
      wait_clocks = (p % 3 == 0) ? $urandom_range(1, 5) : 0;
      for (int w = 0; w < wait_clocks; w++) begin
        @(negedge clk);
        rng_valid = 1'b0;
        #1;
        chk(stall && !fire_en && busy, "stall while rng not valid");
        if (stall) stalls++;
      end
      @(negedge clk);
      rng_valid = 1'b1;
      #1;
      chk(fire_en && !stall && busy, "fire clock");
    end
    chk(stalls > 0 && ignored > 0, "stall and ignored tick both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
