// tb_matmul_index: gives matmul_index random matrix shapes and offsets, with
// the two control pulses in either order and some clocks apart, and checks
// every issued product against the i, j, k loops of C = A*B: A address
// offset_a + i*widthA + k, B address offset_b + k*widthB + j, C address
// i*widthB + j, first at k = 0, last at the final product, one per clock.
// Shapes that do not fit (widthA != heightB) must raise dim_error and issue
// nothing.
`timescale 1ns/1ps
module tb_matmul_index;
  import fnn_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  index_control_t ctrl_a = '0, ctrl_b = '0;
  index_value_t idx_a, idx_b, idx_c;
  logic first, last, busy, dim_error;
  dim_t out_height, out_width;
  matmul_index dut (.*);
  int checks = 0, failures = 0, n_err = 0;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int ha, wa, hb, wb, oa, ob, gap;
      logic bad;
      ha = 1 + $urandom % 4; wa = 1 + $urandom % 5; wb = 1 + $urandom % 5;
      bad = ($urandom % 5 == 0);
      hb = bad ? wa + 1 : wa;
      oa = $urandom % 30; ob = $urandom % 30; gap = $urandom % 4;
      @(negedge clk);
      if (t % 2 == 0) ctrl_a = '{ready: 1, height: dim_t'(ha), width: dim_t'(wa), offset_a: addr_t'(oa), offset_b: '0};
      else            ctrl_b = '{ready: 1, height: dim_t'(hb), width: dim_t'(wb), offset_a: '0, offset_b: addr_t'(ob)};
      repeat (gap) begin @(negedge clk); ctrl_a.ready = 0; ctrl_b.ready = 0; end
      @(negedge clk);
      if (t % 2 == 0) ctrl_b = '{ready: 1, height: dim_t'(hb), width: dim_t'(wb), offset_a: '0, offset_b: addr_t'(ob)};
      else            ctrl_a = '{ready: 1, height: dim_t'(ha), width: dim_t'(wa), offset_a: addr_t'(oa), offset_b: '0};
      @(negedge clk);
      ctrl_a.ready = 0; ctrl_b.ready = 0;
      @(negedge clk);
      if (bad) begin
        @(negedge clk);
        n_err++;
        checks += 2;
        if (!dim_error) begin failures++; $display("FAIL t%0d no dim_error", t); end
        if (idx_a.ready) failures++;
        continue;
      end
      for (int i = 0; i < ha; i++) for (int j = 0; j < wb; j++) for (int k = 0; k < wa; k++) begin
        @(negedge clk);
        checks++;
        if (!idx_a.ready || idx_a.addr != addr_t'(oa + i*wa + k) ||
            !idx_b.ready || idx_b.addr != addr_t'(ob + k*wb + j) ||
            !idx_c.ready || idx_c.addr != addr_t'(i*wb + j) ||
            first != (k == 0) || last != (i == ha-1 && j == wb-1 && k == wa-1) || dim_error) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d i%0d j%0d k%0d: a=%0d b=%0d c=%0d", t, i, j, k, idx_a.addr, idx_b.addr, idx_c.addr);
        end
      end
      @(negedge clk);
      checks++;
      if (idx_a.ready) failures++;
    end
    checks++;
    if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
