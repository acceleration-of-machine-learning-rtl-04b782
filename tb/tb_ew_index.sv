// tb_ew_index: runs ew_index in all four operand-B modes side by side on
// random tensor shapes and offsets, and checks every issued address against
// the nested row/column loops: output n, A offset_a + n, B offset_b + n,
// offset_b + col or offset_b + col/group, never ready for B_NONE. It also
// checks the last flag, one element per clock without gaps, the start two
// clocks after the control pulse, and that a pulse during a walk is ignored.
`timescale 1ns/1ps
module tb_ew_index;
  import fnn_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  index_control_t ctrl = '0;
  dim_t group = '0;
  index_value_t a[4], b[4], o[4];
  logic last[4], busy[4];
  ew_index #(.B_MODE(B_NONE))  d0 (.clk, .rst_n, .ctrl, .group, .idx_a(a[0]), .idx_b(b[0]), .idx_o(o[0]), .last(last[0]), .busy(busy[0]));
  ew_index #(.B_MODE(B_SAME))  d1 (.clk, .rst_n, .ctrl, .group, .idx_a(a[1]), .idx_b(b[1]), .idx_o(o[1]), .last(last[1]), .busy(busy[1]));
  ew_index #(.B_MODE(B_COL))   d2 (.clk, .rst_n, .ctrl, .group, .idx_a(a[2]), .idx_b(b[2]), .idx_o(o[2]), .last(last[2]), .busy(busy[2]));
  ew_index #(.B_MODE(B_GROUP)) d3 (.clk, .rst_n, .ctrl, .group, .idx_a(a[3]), .idx_b(b[3]), .idx_o(o[3]), .last(last[3]), .busy(busy[3]));
  int checks = 0, failures = 0;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int hh, ww, g, oa, ob;
      hh = 1 + $urandom % 5; ww = 1 + $urandom % 12; g = 1 + $urandom % 4;
      oa = $urandom % 50; ob = $urandom % 50;
      @(negedge clk);
      ctrl = '{ready: 1, height: dim_t'(hh), width: dim_t'(ww), offset_a: addr_t'(oa), offset_b: addr_t'(ob)};
      group = dim_t'(g);
      @(negedge clk);
      ctrl.ready = 0;
      checks++;
      if (o[1].ready) fail("issued too early");
      for (int r = 0; r < hh; r++) for (int c = 0; c < ww; c++) begin
        int n;
        n = r*ww + c;
        @(negedge clk);
        if (r == 0 && c == 1) begin   // a pulse during the walk is ignored
          ctrl.ready = 1; ctrl.height = 9;
        end else ctrl.ready = 0;
        for (int m = 0; m < 4; m++) begin
          checks += 4;
          if (!o[m].ready || o[m].addr != addr_t'(n)) fail($sformatf("t%0d m%0d out n=%0d", t, m, n));
          if (!a[m].ready || a[m].addr != addr_t'(oa + n)) fail($sformatf("t%0d m%0d A n=%0d", t, m, n));
          if (last[m] != (r == hh-1 && c == ww-1)) fail($sformatf("t%0d m%0d last", t, m));
          case (m)
            0: if (b[m].ready) fail("B_NONE ready");
            1: if (!b[m].ready || b[m].addr != addr_t'(ob + n)) fail($sformatf("t%0d B_SAME", t));
            2: if (!b[m].ready || b[m].addr != addr_t'(ob + c)) fail($sformatf("t%0d B_COL", t));
            3: if (!b[m].ready || b[m].addr != addr_t'(ob + c / g)) fail($sformatf("t%0d B_GROUP c=%0d g=%0d got %0d", t, c, g, b[m].addr));
          endcase
        end
      end
      ctrl.ready = 0;
      @(negedge clk);
      checks++;
      if (o[1].ready || o[3].ready) fail("issued past the end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
