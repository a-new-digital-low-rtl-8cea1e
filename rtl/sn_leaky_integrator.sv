// sn_leaky_integrator: membrane-potential register Y with its leak.
//
// Once per pulse cycle (update) the weighted input sum of that cycle is
// scaled by the gain shift (left shift by LF for LF < 3, by LF-3 for LF > 2,
// see sn_pkg::gain_shift) and added to Y. When the leakage timer has run out,
// the result is then multiplied by alpha = 1 - 2^-LF with one arithmetic right
// shift and a subtract, Y <- Y - (Y >>> LF), and the timer reloads with LP;
// otherwise the timer counts down. A leak therefore happens once every LP+1
// pulse cycles, the time constant is 2^LF (1+LP) pulse cycles, and the
// steady-state gain is the published 2^(2LF)(1+LP) (LF < 3) or
// 2^(2LF-3)(1+LP) (LF > 2). load_v0 loads Y with the reset potential V0 and
// the timer with its start value LT.
//
// The leak arithmetic, LP semantics and gain law follow the neuron's
// description. Saturation of Y at its Y_W-bit limits, the timer reload scheme
// and the use of LT as the timer's start value are this design's choices.
//
// Timing: y, leak_event and sat_event change on the clock edge that ends the
// update clock. With LF = 0 a leak clears Y (alpha = 0).
module sn_leaky_integrator
  import sn_pkg::*;
#(
  parameter int unsigned Y_W = 20,
  parameter int unsigned S_W = 13
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load_v0,
  input  logic                   update,
  input  logic signed [S_W-1:0]  sum,
  input  logic [LF_W-1:0]        lf,
  input  logic [LP_W-1:0]        lp,
  input  logic [LP_W-1:0]        lt,
  input  logic signed [V0_W-1:0] v0,
  output logic signed [Y_W-1:0]  y,
  output logic                   leak_event,
  output logic                   sat_event
);

  // Wide enough for Y plus the largest scaled sum (shift <= 4).
  localparam int unsigned X_W = ((Y_W > S_W + 4) ? Y_W : S_W + 4) + 2;
  localparam logic signed [X_W-1:0] Y_MAX = X_W'({1'b0, {(Y_W-1){1'b1}}});
  localparam logic signed [X_W-1:0] Y_MIN = -Y_MAX - 1;

  logic [LP_W-1:0]        timer;
  logic signed [X_W-1:0]  scaled, added;
  logic signed [Y_W-1:0]  y_sat, leaked, y_next;
  logic                   over;

  always_comb begin
    scaled = X_W'(sum) <<< gain_shift(lf);
    added  = X_W'(y) + scaled;
    over   = (added > Y_MAX) || (added < Y_MIN);
    if (added > Y_MAX)      y_sat = Y_MAX[Y_W-1:0];
    else if (added < Y_MIN) y_sat = Y_MIN[Y_W-1:0];
    else                    y_sat = added[Y_W-1:0];
    // |Y - (Y >>> LF)| <= |Y|, so the leak cannot overflow.
    leaked = y_sat - (y_sat >>> lf);
    y_next = (timer == '0) ? leaked : y_sat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y          <= '0;
      timer      <= '0;
      leak_event <= 1'b0;
      sat_event  <= 1'b0;
    end else begin
      leak_event <= 1'b0;
      sat_event  <= 1'b0;
      if (load_v0) begin
        y     <= Y_W'(v0);
        timer <= lt;
      end else if (update) begin
        y          <= y_next;
        leak_event <= (timer == '0);
        sat_event  <= over;
        timer      <= (timer == '0) ? lp : timer - 1'b1;
      end
    end
  end

endmodule
