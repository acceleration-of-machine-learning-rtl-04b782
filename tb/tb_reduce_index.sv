// tb_reduce_index: runs reduce_index on random shapes and offsets and checks
// every issued element against the row/column loops: input address
// offset_a + row*width + col, output address row, first at col 0, save at
// the last column, last at the final element, one element per clock, the
// start two clocks after the control pulse and nothing issued afterwards.
`timescale 1ns/1ps
module tb_reduce_index;
  import fnn_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  index_control_t ctrl = '0;
  index_value_t idx_a, idx_o;
  logic first, save, last, busy;
  reduce_index dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int hh, ww, oa;
      hh = 1 + $urandom % 6; ww = 1 + $urandom % 10; oa = $urandom % 40;
      @(negedge clk);
      ctrl = '{ready: 1, height: dim_t'(hh), width: dim_t'(ww), offset_a: addr_t'(oa), offset_b: '0};
      @(negedge clk);
      ctrl.ready = 0;
      checks++;
      if (idx_a.ready) failures++;
      for (int r = 0; r < hh; r++) for (int c = 0; c < ww; c++) begin
        @(negedge clk);
        checks++;
        if (!idx_a.ready || idx_a.addr != addr_t'(oa + r*ww + c) || !idx_o.ready || idx_o.addr != addr_t'(r) ||
            first != (c == 0) || save != (c == ww-1) || last != (r == hh-1 && c == ww-1)) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d r%0d c%0d", t, r, c);
        end
      end
      @(negedge clk);
      checks++;
      if (idx_a.ready || idx_o.ready) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
