// sn_rng: random number generator for the activation functions.
//
// A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5) steps once
// per clock for eight clocks after start. Each step contributes one linearly
// distributed (RNG_W-3)-bit number to an accumulator; the sum of the eight,
// minus 2^(RNG_W-1), is the approximately Gaussian number gauss used by the
// Sigmoid activation, centred on zero and spanning a signed RNG_W-bit range.
// The top RNG_W bits of the last step form the linearly distributed number
// uni used by the Identity activation. Using the sum of eight uniform numbers
// for the sigmoid and a uniform number for the identity follows the neuron's
// description; the generator type, widths and the serial drawing are this
// design's choices.
//
// Timing: start in clock 0, valid rises after the edge that ends clock 8 and
// stays high, with uni and gauss held, until the next start. A start while a
// draw is running restarts it.
module sn_rng #(
  parameter int unsigned RNG_W = 16,
  parameter logic [31:0] SEED  = 32'h2545_F491
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic [RNG_W-1:0]        uni,
  output logic signed [RNG_W-1:0] gauss,
  output logic                    valid
);

  localparam int unsigned U_W = RNG_W - 3;

  logic [31:0]      state, nxt, t1, t2;
  logic [RNG_W-1:0] acc, acc_next;
  logic [2:0]       cnt;
  logic             running;

  always_comb begin
    t1       = state ^ (state << 13);
    t2       = t1 ^ (t1 >> 17);
    nxt      = t2 ^ (t2 << 5);
    acc_next = acc + RNG_W'(nxt[U_W-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= (SEED == '0) ? 32'h1 : SEED;
      acc     <= '0;
      cnt     <= '0;
      running <= 1'b0;
      valid   <= 1'b0;
      uni     <= '0;
      gauss   <= '0;
    end else if (start) begin
      acc     <= '0;
      cnt     <= '0;
      running <= 1'b1;
      valid   <= 1'b0;
    end else if (running) begin
      state <= nxt;
      acc   <= acc_next;
      cnt   <= cnt + 1'b1;
      if (cnt == 3'd7) begin
        running <= 1'b0;
        valid   <= 1'b1;
        uni     <= nxt[31 -: RNG_W];
        gauss   <= $signed(acc_next ^ {1'b1, {(RNG_W-1){1'b0}}});
      end
    end
  end

endmodule
