// sn_ref_pkg: cycle-free reference model of the spiking neuron, used by the
// end-to-end testbenches. It computes, per pulse cycle and in plain integer
// arithmetic, what the neuron must do:
//   S   = sum of the weights of the connected synapses that spiked
//   A   = clamp(Y + S * 2^g),  g = LF (LF < 3) or LF - 3 (LF > 2)
//   Y   = A - floor(A / 2^LF) if the leakage timer is 0 (timer <- LP),
//         else A (timer <- timer - 1)
//   eight xorshift32 steps give uni (top 16 bits of the last state) and
//   gauss (sum of the low 13 bits of each state, minus 2^15)
//   fire: Identity Y+theta > uni, Binary Y+theta > 0,
//         Sigmoid Y+theta > gauss, code 3 never.
package sn_ref_pkg;

  class sn_ref_model;
    int          n_syn;
    int          y_w;
    int          w [];
    bit          con [];
    int          af, lf, lp, lt, bias, v0;
    longint      y;
    int          timer;
    logic [31:0] rs;
    // results of the last step
    bit          leak, sat;
    longint      uni, gauss;

    function new(int n, int yw, logic [31:0] seed);
      n_syn = n;
      y_w   = yw;
      w     = new[n];
      con   = new[n];
      foreach (w[i]) begin
        w[i] = 0;
        con[i] = 0;
      end
      af = 0; lf = 0; lp = 0; lt = 0; bias = 0; v0 = 0;
      y = 0; timer = 0;
      rs = seed;
    endfunction

    function void load_v0();
      y = longint'(v0);
      timer = lt;
    endfunction

    static function logic [31:0] xs(logic [31:0] x);
      x = x ^ (x << 13);
      x = x ^ (x >> 17);
      x = x ^ (x << 5);
      return x;
    endfunction

    static function longint floordiv(longint a, int sh);
      longint d = 64'sd1 <<< sh;
      longint q = a / d;
      if (a < 0 && q * d != a) q -= 1;
      return q;
    endfunction

    // One pulse cycle with synapse snapshot ff (bit i = synapse i spiked).
    function bit step(logic [63:0] ff);
      longint s = 0, a, v;
      longint ymax = (64'sd1 <<< (y_w - 1)) - 1;
      longint ymin = -(64'sd1 <<< (y_w - 1));
      int g = (lf < 3) ? lf : lf - 3;
      for (int i = 0; i < n_syn; i++) if (ff[i] && con[i]) s += longint'(w[i]);
      a = y + s * (64'sd1 <<< g);
      sat = (a > ymax) || (a < ymin);
      if (a > ymax) a = ymax;
      if (a < ymin) a = ymin;
      leak = (timer == 0);
      if (leak) begin
        a = a - floordiv(a, lf);
        timer = lp;
      end else begin
        timer--;
      end
      y = a;
      gauss = 0;
      for (int k = 0; k < 8; k++) begin
        rs = xs(rs);
        gauss += longint'(rs[12:0]);
      end
      gauss -= 32768;
      uni = longint'(rs[31:16]);
      v = y + longint'(bias);
      case (af)
        0: return v > uni;
        1: return v > 0;
        2: return v > gauss;
        default: return 1'b0;
      endcase
    endfunction
  endclass

endpackage
