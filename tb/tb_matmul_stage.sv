// tb_matmul_stage: loads random matrices A and B into dp_rams, runs
// matmul_stage and checks every element of C against a real-valued dot
// product, both for C = A*B (use_c = 0, C RAM holding garbage) and for
// C += A*B (use_c = 1, C preloaded). It checks the shape on ctrl_out, the
// run time (ctrl_out pulses heightA*widthB*widthA + 8 clocks after the later
// start pulse) and that the forwarding path was used.
`timescale 1ns/1ps
module tb_matmul_stage;
  import fnn_pkg::*;
  import fnn_ref_pkg::*;
  localparam int DEPTH = 128;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  index_control_t ctrl_a = '0, ctrl_b = '0, ctrl_out;
  logic use_c = 0, dim_error, fwd_hit;
  rd_ctrl_t rd_a, rd_b, rd_c, rd_cx, rd_chk = '0;
  fix_t rdata_a, rdata_b, rdata_c;
  wr_ctrl_t wr_c, wr_a = '0, wr_b = '0, wr_cl = '0, wr_cx;
  matmul_stage dut (.*);
  dp_ram #(.DEPTH(DEPTH)) ma (.clk, .wr(wr_a), .rd(rd_a), .rdata(rdata_a));
  dp_ram #(.DEPTH(DEPTH)) mb (.clk, .wr(wr_b), .rd(rd_b), .rdata(rdata_b));
  dp_ram #(.DEPTH(DEPTH)) mc (.clk, .wr(wr_cx), .rd(rd_cx), .rdata(rdata_c));
  assign wr_cx = wr_cl.en ? wr_cl : wr_c;
  assign rd_cx = rd_chk.en ? rd_chk : rd_c;
  int checks = 0, failures = 0, hits = 0;
  longint cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (fwd_hit) hits++;
  end
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int a [DEPTH], b [DEPTH], c0 [DEPTH];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      int ha, wa, wb;
      longint t0;
      ha = 1 + $urandom % 6; wa = 1 + $urandom % 8; wb = 1 + $urandom % 6;
      use_c = t[0];
      for (int k = 0; k < DEPTH; k++) begin
        @(negedge clk);
        a[k] = rand_fix(-2.0, 2.0); b[k] = rand_fix(-2.0, 2.0); c0[k] = rand_fix(-2.0, 2.0);
        wr_a  = '{en: 1, addr: addr_t'(k), data: a[k]};
        wr_b  = '{en: 1, addr: addr_t'(k), data: b[k]};
        wr_cl = '{en: 1, addr: addr_t'(k), data: c0[k]};
      end
      @(negedge clk);
      wr_a = '0; wr_b = '0; wr_cl = '0;
      ctrl_b = '{ready: 1, height: dim_t'(wa), width: dim_t'(wb), offset_a: '0, offset_b: '0};
      @(negedge clk);
      ctrl_b = '0;
      ctrl_a = '{ready: 1, height: dim_t'(ha), width: dim_t'(wa), offset_a: '0, offset_b: '0};
      t0 = cycle;
      @(negedge clk);
      ctrl_a = '0;
      while (!ctrl_out.ready) @(negedge clk);
      checks += 2;
      if (cycle - t0 != longint'(ha*wb*wa + 8)) begin failures++; $display("FAIL t%0d took %0d", t, cycle - t0); end
      if (ctrl_out.height != dim_t'(ha) || ctrl_out.width != dim_t'(wb)) begin failures++; $display("FAIL shape"); end
      for (int i = 0; i < ha; i++) for (int j = 0; j < wb; j++) begin
        real e;
        e = use_c ? to_r(c0[i*wb + j]) : 0.0;
        for (int k = 0; k < wa; k++) e += to_r(a[i*wa + k]) * to_r(b[k*wb + j]);
        @(negedge clk);
        rd_chk = '{en: 1, addr: addr_t'(i*wb + j)};
        @(negedge clk);
        rd_chk = '0;
        checks++;
        if (to_r(rdata_c) - e > 0.001 || e - to_r(rdata_c) > 0.001) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d C(%0d,%0d) got %f exp %f", t, i, j, to_r(rdata_c), e);
        end
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL forwarding never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
