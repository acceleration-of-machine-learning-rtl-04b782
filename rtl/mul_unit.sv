// mul_unit: fixed-point element-wise product (the Mul processes).
//
// y = a * b with FRAC fraction bits kept and the result saturated to the
// element range. It forms the second-layer products with Wz and Wr, the
// scaling by z_scale and the final product r * z. One register stage: the
// product of inputs presented in clock t is on y in clock t+1.
module mul_unit
  import fnn_pkg::*;
(
  input  logic clk,
  input  fix_t a,
  input  fix_t b,
  output fix_t y
);

  always_ff @(posedge clk) begin
    y <= fx_mul(a, b);
  end

endmodule
