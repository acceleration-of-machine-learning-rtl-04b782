// prelu_unit: parametric rectified linear unit (the Hz and Hr processes).
//
// y = a for a >= 0 and y = slope * a otherwise, in fixed point. The model
// applies two such activations to the first-layer output, each with its own
// slope per network; the slope comes in on b. One register stage: the result
// for inputs presented in clock t is on y in clock t+1.
module prelu_unit
  import fnn_pkg::*;
(
  input  logic clk,
  input  fix_t a,        // activation input
  input  fix_t b,        // slope for negative inputs
  output fix_t y
);

  always_ff @(posedge clk) begin
    y <= (a < 0) ? fx_mul(b, a) : a;
  end

endmodule
