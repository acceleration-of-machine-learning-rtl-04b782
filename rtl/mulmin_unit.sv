// mulmin_unit: y = 2*a - 1 (the Mulmin process).
//
// Maps a sigmoid output in [0, 1] to [-1, 1], as in 2*sigmoid(x) - 1 of the
// model. Split, like the reference design, into a multiply stage
// (Mulmin_mul, here a saturating doubling) and a subtract stage (Mulmin_sub).
// Two register stages: the result for an input in clock t is on y in t+2.
module mulmin_unit
  import fnn_pkg::*;
(
  input  logic clk,
  input  fix_t a,
  input  fix_t b,        // unused: the unit has one operand
  output fix_t y
);

  fix_t twice;

  always_ff @(posedge clk) begin
    twice <= fx_add(a, a);
    y     <= fx_add(twice, -FX_ONE);
  end

  logic unused_b;
  assign unused_b = ^b;

endmodule
