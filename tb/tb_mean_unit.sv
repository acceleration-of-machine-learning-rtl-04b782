// tb_mean_unit: rows of random length are averaged; each mean must appear, with y_valid, exactly two clocks after the last element of its row, and match the sum divided by the count (truncated toward zero).
// Idle clocks (valid low) are inserted between some rows.
`timescale 1ns/1ps
module tb_mean_unit;
  import fnn_pkg::*;
  import fnn_ref_pkg::*;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic valid = 0, first = 0, save = 0;
  fix_t x = '0, y;
  logic y_valid;
  mean_unit dut (.*);
  int checks = 0, failures = 0, outputs = 0;
  longint cycle = 0;
  real    exp_q [$];
  longint due_q [$];
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // compare every valid output with the oldest expected row result
  always @(negedge clk) if (rst_n && y_valid) begin
    real e;
    longint due;
    e = exp_q.pop_back();
    due = due_q.pop_back();
    outputs++;
    checks += 2;
    if (to_r(y) - e > 0.0001 || e - to_r(y) > 0.0001) begin
      failures++; $display("FAIL value got %f exp %f", to_r(y), e);
    end
    if (cycle != due) begin failures++; $display("FAIL timing at %0d, due %0d", cycle, due); end
  end
  initial begin
    int rows;
    rows = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 100; r++) begin
      int len;
      real s;
      len = 1 + $urandom % 20;
      s = 0.0;
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        valid = 1; first = (c == 0); save = (c == len - 1);
        x = rand_fix(-4.0, 4.0);
        s += to_r(x);
      end
      s = s / real'(len);
      if (2 == 2) s = real'($rtoi(s * SCALE)) / SCALE;   // division truncates
      exp_q.push_front(s);
      due_q.push_front(cycle + LAT);
      rows++;
      if ($urandom % 3 == 0) begin
        @(negedge clk);
        valid = 0; first = 0; save = 0;
      end
    end
    @(negedge clk);
    valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (outputs != rows) begin failures++; $display("FAIL %0d outputs for %0d rows", outputs, rows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
