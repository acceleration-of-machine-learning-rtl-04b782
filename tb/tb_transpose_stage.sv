// tb_transpose_stage: fills a source dp_ram with random matrices of random
// shape, runs transpose_stage into a destination dp_ram and checks every
// element of the result (dst[i*height + j] = src[j*width + i]), the shape on
// ctrl_out and the run time: ctrl_out pulses exactly height*width + 5 clocks
// after the start pulse.
`timescale 1ns/1ps
module tb_transpose_stage;
  import fnn_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  index_control_t ctrl_in = '0, ctrl_out;
  rd_ctrl_t rd, rd_chk = '0;
  fix_t rdata, rdata_chk;
  wr_ctrl_t wr, wr_ld = '0;
  transpose_stage dut (.*);
  dp_ram #(.DEPTH(DEPTH)) src (.clk, .wr(wr_ld), .rd, .rdata);
  dp_ram #(.DEPTH(DEPTH)) dst (.clk, .wr, .rd(rd_chk), .rdata(rdata_chk));
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    fix_t m [DEPTH];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int hh, ww;
      longint t0;
      hh = 1 + $urandom % 15; ww = 1 + $urandom % 15;
      for (int k = 0; k < hh*ww; k++) begin
        @(negedge clk);
        m[k] = fix_t'($urandom);
        wr_ld = '{en: 1, addr: addr_t'(k), data: m[k]};
      end
      @(negedge clk);
      wr_ld = '0;
      ctrl_in = '{ready: 1, height: dim_t'(hh), width: dim_t'(ww), offset_a: '0, offset_b: '0};
      t0 = cycle;
      @(negedge clk);
      ctrl_in = '0;
      while (!ctrl_out.ready) @(negedge clk);
      checks += 2;
      if (cycle - t0 != longint'(hh*ww + 5)) begin failures++; $display("FAIL t%0d took %0d", t, cycle - t0); end
      if (ctrl_out.height != dim_t'(ww) || ctrl_out.width != dim_t'(hh)) begin failures++; $display("FAIL shape"); end
      for (int i = 0; i < ww; i++) for (int j = 0; j < hh; j++) begin
        @(negedge clk);
        rd_chk = '{en: 1, addr: addr_t'(i*hh + j)};
        @(negedge clk);
        rd_chk = '0;
        checks++;
        if (rdata_chk !== m[j*ww + i]) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d (%0d,%0d)", t, i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
