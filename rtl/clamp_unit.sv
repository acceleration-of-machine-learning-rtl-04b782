// clamp_unit: clips each network's prediction to [-max, max] (the Clamp
// process).
//
// b carries max_predict, which must not be negative. One register stage: the
// result for inputs presented in clock t is on y in clock t+1.
module clamp_unit
  import fnn_pkg::*;
(
  input  logic clk,
  input  fix_t a,        // prediction
  input  fix_t b,        // max_predict
  output fix_t y
);

  always_ff @(posedge clk) begin
    if (a > b)       y <= b;
    else if (a < -b) y <= -b;
    else             y <= a;
  end

endmodule
