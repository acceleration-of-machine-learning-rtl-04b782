// tb_reduce_stage: runs a sum stage (MEAN = 0) and a mean stage (MEAN = 1)
// side by side on random matrices of random shape, read from a testbench RAM
// model with a one-clock read. Each row result is compared with the row sum,
// or the row sum divided by the row length truncating toward zero, worked
// out here in integer arithmetic. It also checks that exactly one result per
// row is written and nothing else, the shape height x 1 on ctrl_out, and the
// run time: ctrl_out pulses height*width + 6 (sum) or + 7 (mean) clocks after
// the start pulse.
`timescale 1ns/1ps
module tb_reduce_stage;
  import fnn_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  index_control_t ctrl_in = '0;
  index_control_t ctrl_out [2];
  rd_ctrl_t rd_a [2];
  fix_t rdata_a [2];
  wr_ctrl_t wr [2];
  fix_t mem [DEPTH];
  fix_t res [2][DEPTH];
  int   nwr [2][DEPTH];

  reduce_stage #(.MEAN(1'b0)) s_sum  (.clk, .rst_n, .ctrl_in, .rd_a(rd_a[0]), .rdata_a(rdata_a[0]),
                                      .wr(wr[0]), .ctrl_out(ctrl_out[0]));
  reduce_stage #(.MEAN(1'b1)) s_mean (.clk, .rst_n, .ctrl_in, .rd_a(rd_a[1]), .rdata_a(rdata_a[1]),
                                      .wr(wr[1]), .ctrl_out(ctrl_out[1]));

  for (genvar s = 0; s < 2; s++) begin : g_ram
    always_ff @(posedge clk) begin
      if (rd_a[s].en) rdata_a[s] <= mem[rd_a[s].addr];
      if (wr[s].en) begin
        res[s][wr[s].addr] <= wr[s].data;
        nwr[s][wr[s].addr] <= nwr[s][wr[s].addr] + 1;
      end
    end
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t0;
    longint t_done [2];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int hh, ww;
      hh = 1 + $urandom % 8;
      ww = 1 + $urandom % 16;
      for (int k = 0; k < DEPTH; k++) begin
        mem[k] = fix_t'(int'($urandom % 524288) - 262144);
        nwr[0][k] = 0;
        nwr[1][k] = 0;
      end
      @(negedge clk);
      ctrl_in = '{ready: 1, height: dim_t'(hh), width: dim_t'(ww), offset_a: '0, offset_b: '0};
      t0 = cycle;
      @(negedge clk);
      ctrl_in = '0;
      t_done = '{-1, -1};
      while (t_done[0] < 0 || t_done[1] < 0) begin
        for (int s = 0; s < 2; s++)
          if (ctrl_out[s].ready) begin
            t_done[s] = cycle - t0;
            checks++;
            if (ctrl_out[s].height != dim_t'(hh) || ctrl_out[s].width != dim_t'(1)) begin
              failures++;
              $display("FAIL t%0d stage %0d shape", t, s);
            end
          end
        @(negedge clk);
      end
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (t_done[s] != longint'(hh*ww + 6 + s)) begin
          failures++;
          $display("FAIL t%0d stage %0d took %0d clocks for %0d elements", t, s, t_done[s], hh*ww);
        end
      end
      for (int row = 0; row < DEPTH; row++) begin
        longint sum;
        fix_t e [2];
        sum = 0;
        if (row < hh) for (int c = 0; c < ww; c++) sum += longint'(mem[row*ww + c]);
        e[0] = fix_t'(sum);
        e[1] = fix_t'(sum / ww);
        for (int s = 0; s < 2; s++) begin
          checks++;
          if (row < hh) begin
            if (nwr[s][row] != 1 || res[s][row] != e[s]) begin
              failures++;
              if (failures < 20) $display("FAIL t%0d stage %0d row %0d: %0d writes, got %0d expected %0d",
                                          t, s, row, nwr[s][row], res[s][row], e[s]);
            end
          end else if (nwr[s][row] != 0) begin
            failures++;
            $display("FAIL t%0d stage %0d wrote row %0d", t, s, row);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
