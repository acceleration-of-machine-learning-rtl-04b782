// tb_ctrl_join: sends one ready pulse on each of the two control buses with a
// random distance between them (either order, or both in the same clock) and
// random shapes, and checks that exactly one joined pulse comes out, one
// clock after the later of the two, carrying the shape of bus a, and that
// waited is set with it exactly when the pulses came in different clocks.
`timescale 1ns/1ps
module tb_ctrl_join;
  import fnn_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  index_control_t ctrl_a = '0, ctrl_b = '0, ctrl_out;
  logic waited;
  ctrl_join dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int da, db, last, outs;
      index_control_t sa, sb;
      da = $urandom % 6;
      db = (t % 5 == 0) ? da : $urandom % 6;
      last = (da > db) ? da : db;
      sa = '{ready: 1, height: dim_t'($urandom), width: dim_t'($urandom), offset_a: addr_t'($urandom), offset_b: addr_t'($urandom)};
      sb = '{ready: 1, height: dim_t'($urandom), width: dim_t'($urandom), offset_a: addr_t'($urandom), offset_b: addr_t'($urandom)};
      outs = 0;
      for (int c = 0; c < last + 4; c++) begin
        ctrl_a = (c == da) ? sa : '0;
        ctrl_b = (c == db) ? sb : '0;
        @(negedge clk);
        if (ctrl_out.ready) begin
          outs++;
          checks += 3;
          if (c != last) begin
            failures++;
            $display("FAIL t%0d joined pulse %0d clocks after the first, expected %0d", t, c, last);
          end
          if (ctrl_out.height != sa.height || ctrl_out.width != sa.width ||
              ctrl_out.offset_a != sa.offset_a || ctrl_out.offset_b != sa.offset_b) begin
            failures++;
            $display("FAIL t%0d shape is not that of bus a", t);
          end
          if (waited != (da != db)) begin
            failures++;
            $display("FAIL t%0d waited = %0b with a at %0d, b at %0d", t, waited, da, db);
          end
        end else begin
          checks++;
          if (waited) begin
            failures++;
            $display("FAIL t%0d waited without a joined pulse", t);
          end
        end
      end
      checks++;
      if (outs != 1) begin
        failures++;
        $display("FAIL t%0d %0d joined pulses", t, outs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
