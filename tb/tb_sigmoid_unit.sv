// tb_sigmoid_unit: checks the piecewise-linear logistic function against the exact one over [-10, 10], including the saturated region.
// A new random operand pair is applied every clock; each result is compared
// with a floating-point reference exactly 3 clock(s) later, which also
// checks the latency of the unit.
`timescale 1ns/1ps
module tb_sigmoid_unit;
  import fnn_pkg::*;
  import fnn_ref_pkg::*;
  localparam int LAT = 3;
  localparam real TOL = 0.004;
  logic clk = 0;
  always #5 clk = ~clk;
  fix_t a = '0, b = '0, y;
  sigmoid_unit dut (.clk, .a, .b, .y);
  int checks = 0, failures = 0;
  real exp_q [$];
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic real ref_f(real av, real bv);
    return sigmoid(av);
  endfunction
  initial begin
    for (int n = 0; n < 2000 + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        real e;
        e = exp_q.pop_back();
        checks++;
        if (to_r(y) - e > TOL || e - to_r(y) > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d got %f exp %f", n, to_r(y), e);
        end
      end
      a = rand_fix(-10.0, 10.0);
      b = rand_fix(0.0, 1.0);
      exp_q.push_front(ref_f(to_r(a), to_r(b)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
