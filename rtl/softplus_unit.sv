// softplus_unit: y = log(1 + exp(a)) (the Softplus process).
//
// Evaluated as softplus(a) = max(a, 0) + g(|a|) with g(u) = log(1+exp(-u)).
// g is interpolated linearly between knots g(k/2), k = 0..16, stored in fixed
// point as round(2^FRAC * log(1+exp(-k/2))); for |a| >= 8 the last knot is
// used. The maximum error is below 0.008. This approximation is the design's
// own choice.
//
// Two register stages, like Softplus_1 and Softplus_2 of the reference
// design:
//   1. |a|, table look-up of the two knots around it and the offset,
//   2. interpolation and addition of max(a, 0).
// The result for an input in clock t is on y in clock t+2.
module softplus_unit
  import fnn_pkg::*;
(
  input  logic clk,
  input  fix_t a,
  input  fix_t b,        // unused: the unit has one operand
  output fix_t y
);

  localparam int NK = 17;
  // round(65536 * log(1 + exp(-k/2))), k = 0..16, for FRAC = 16
  localparam int KNOT [NK] = '{45426, 31069, 20530, 13200, 8318, 5170, 3184, 1950,
                               1189, 724, 440, 267, 162, 98, 60, 36, 22};

  function automatic fix_t knot(int k);
    return fix_t'((longint'(KNOT[k]) <<< FRAC) >>> 16);
  endfunction

  fix_t abs_a;
  assign abs_a = (a < 0) ? ((a == FX_MIN) ? FX_MAX : -a) : a;

  logic [4:0] seg;
  assign seg = 5'(abs_a >>> (FRAC-1));

  // stage 1
  fix_t s1_k0, s1_k1, s1_off, s1_pos;
  // stage 2 is y

  always_ff @(posedge clk) begin
    if (abs_a >= (fix_t'(8) <<< FRAC)) begin
      s1_k0  <= knot(NK-1);
      s1_k1  <= knot(NK-1);
    end else begin
      s1_k0  <= knot(int'(seg));
      s1_k1  <= knot(int'(seg) + 1);
    end
    s1_off <= abs_a & ((fix_t'(1) <<< (FRAC-1)) - 1);
    s1_pos <= (a > 0) ? a : '0;
    y <= fx_add(s1_pos, s1_k0 + fix_t'(((longint'(s1_k1) - longint'(s1_k0)) * longint'(s1_off)) >>> (FRAC-1)));
  end

  logic unused_b;
  assign unused_b = ^b;

endmodule
