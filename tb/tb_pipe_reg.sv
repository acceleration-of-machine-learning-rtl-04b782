// tb_pipe_reg: drives random values into pipe_reg chains of depth 1 and 3
// and checks that each output is the input delayed by exactly that many
// clocks, and that reset clears the chain.
`timescale 1ns/1ps
module tb_pipe_reg;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic [15:0] d = '0, q1, q3;
  pipe_reg #(.T(logic [15:0]), .DEPTH(1)) dut1 (.clk, .rst_n, .d, .q(q1));
  pipe_reg #(.T(logic [15:0]), .DEPTH(3)) dut3 (.clk, .rst_n, .d, .q(q3));
  int checks = 0, failures = 0;
  logic [15:0] hist [$];
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk);
    checks += 2;
    if (q1 !== 0) failures++;
    if (q3 !== 0) failures++;
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      d = 16'($urandom);
      hist.push_front(d);
      @(negedge clk);
      checks++;
      if (q1 !== hist[0]) begin failures++; $display("FAIL depth1 n=%0d", n); end
      if (n >= 2) begin
        checks++;
        if (q3 !== hist[2]) begin failures++; $display("FAIL depth3 n=%0d", n); end
      end
    end
    rst_n = 0;
    #1;
    checks++;
    if (q3 !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
