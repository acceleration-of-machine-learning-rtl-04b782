// sigmoid_unit: logistic function y = 1/(1+exp(-a)) (the Sigmoid process).
//
// Floating-point exp and division are not available as plain logic, so the
// function is evaluated by piecewise-linear interpolation: the table holds
// sigmoid(k/2) for k = 0..16 in fixed point, i.e. round(2^FRAC/(1+exp(-k/2))),
// and the value between two knots is interpolated linearly. For a < 0 the
// symmetry sigmoid(a) = 1 - sigmoid(-a) is used; for |a| >= 8 the last knot
// is returned. The maximum error is below 0.004. This approximation is the
// design's own choice.
//
// Three register stages, like Sigmoid_1..3 of the reference design:
//   1. |a|, segment number and offset inside the segment,
//   2. table look-up and interpolation,
//   3. sign correction.
// The result for an input in clock t is on y in clock t+3.
module sigmoid_unit
  import fnn_pkg::*;
(
  input  logic clk,
  input  fix_t a,
  input  fix_t b,        // unused: the unit has one operand
  output fix_t y
);

  localparam int NK = 17;
  // round(65536 / (1 + exp(-k/2))), k = 0..16, for FRAC = 16
  localparam int KNOT [NK] = '{32768, 40793, 47911, 53581, 57724, 60565, 62428, 63615,
                               64357, 64816, 65097, 65269, 65374, 65438, 65476, 65500, 65514};

  // fix_t value of knot k, rescaled if FRAC is not 16
  function automatic fix_t knot(int k);
    return fix_t'((longint'(KNOT[k]) <<< FRAC) >>> 16);
  endfunction

  // stage 1
  logic [4:0] s1_seg;
  fix_t       s1_off;      // offset from the knot, in [0, 0.5)
  logic       s1_neg;
  logic       s1_sat;
  // stage 2
  fix_t       s2_val;
  logic       s2_neg;

  fix_t abs_a;
  assign abs_a = (a < 0) ? ((a == FX_MIN) ? FX_MAX : -a) : a;

  always_ff @(posedge clk) begin
    // 1: segment of width 0.5
    s1_neg <= (a < 0);
    s1_sat <= (abs_a >= (fix_t'(8) <<< FRAC));
    s1_seg <= 5'(abs_a >>> (FRAC-1));
    s1_off <= abs_a & ((fix_t'(1) <<< (FRAC-1)) - 1);
    // 2: interpolate: knot + (next - knot) * off / 0.5
    if (s1_sat || s1_seg >= 5'(NK-1)) s2_val <= knot(NK-1);
    else s2_val <= knot(int'(s1_seg)) +
                   fix_t'(((longint'(knot(int'(s1_seg)+1)) - longint'(knot(int'(s1_seg)))) * longint'(s1_off)) >>> (FRAC-1));
    s2_neg <= s1_neg;
    // 3: symmetry for negative inputs
    y <= s2_neg ? (FX_ONE - s2_val) : s2_val;
  end

  logic unused_b;
  assign unused_b = ^b;

endmodule
