// tb_sn_synapse_latch: self-checking test of the synapse spike flops.
// Drives random spikes and random capture strobes, keeps its own record of
// the spikes seen since the last capture, and checks every snapshot.
module tb_sn_synapse_latch;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] spike_in = '0, ff, pend = '0, expect_ff = '0;
  logic capture = 1'b0;
  int checks = 0, failures = 0;

  sn_synapse_latch #(.N_SYN(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check the state produced by the previous edge
      checks++;
      if (ff !== expect_ff) begin
        failures++;
        $display("cycle %0d: ff=%h expected %h", i, ff, expect_ff);
      end
      // sparse spikes, so a bit is often set in only one clock
      spike_in = N'($urandom() & $urandom() & $urandom());
      capture  = ($urandom_range(0, 3) == 0);
      if (capture) begin
        expect_ff = pend | spike_in;
        pend      = '0;
      end else begin
        pend = pend | spike_in;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
