// tb_mulmin_unit: checks 2*a - 1 against a real-valued reference.
// A new random operand pair is applied every clock; each result is compared
// with a floating-point reference exactly 2 clock(s) later, which also
// checks the latency of the unit.
`timescale 1ns/1ps
module tb_mulmin_unit;
  import fnn_pkg::*;
  import fnn_ref_pkg::*;
  localparam int LAT = 2;
  localparam real TOL = 0.0001;
  logic clk = 0;
  always #5 clk = ~clk;
  fix_t a = '0, b = '0, y;
  mulmin_unit dut (.clk, .a, .b, .y);
  int checks = 0, failures = 0;
  real exp_q [$];
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic real ref_f(real av, real bv);
    return 2.0 * av - 1.0;
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
      a = rand_fix(0.0, 1.0);
      b = rand_fix(0.0, 1.0);
      exp_q.push_front(ref_f(to_r(a), to_r(b)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
