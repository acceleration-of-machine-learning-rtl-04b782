// tb_ew_stage: runs three element-wise stages side by side on the same random
// tensors: a product with the second operand broadcast per column
// (OP_MUL, B_COL), a PReLU with one slope per group of columns
// (OP_PRELU, B_GROUP) and a clamp against a constant (OP_CLAMP, B_NONE).
// The operand RAMs are modelled in the testbench with a one-clock read. Each
// written element is compared with the value worked out here in integer
// arithmetic; the testbench also checks that every element is written once,
// the shape on ctrl_out, and the run time: ctrl_out pulses
// height*width + 5 + L clocks after the start pulse, L being the unit's
// latency.
`timescale 1ns/1ps
module tb_ew_stage;
  import fnn_pkg::*;
  localparam int DEPTH = 256;
  localparam int NS = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  index_control_t ctrl_in = '0;
  index_control_t ctrl_out [NS];
  dim_t group = '0;
  fix_t konst = '0;
  rd_ctrl_t rd_a [NS], rd_b [NS];
  fix_t rdata_a [NS], rdata_b [NS];
  wr_ctrl_t wr [NS];

  fix_t mem_a [DEPTH], mem_b [DEPTH];
  fix_t res [NS][DEPTH];
  int   nwr [NS][DEPTH];

  ew_stage #(.OP(OP_MUL),   .B_MODE(B_COL))   s_mul (.clk, .rst_n, .ctrl_in, .group, .konst,
    .rd_a(rd_a[0]), .rdata_a(rdata_a[0]), .rd_b(rd_b[0]), .rdata_b(rdata_b[0]), .wr(wr[0]), .ctrl_out(ctrl_out[0]));
  ew_stage #(.OP(OP_PRELU), .B_MODE(B_GROUP)) s_prelu (.clk, .rst_n, .ctrl_in, .group, .konst,
    .rd_a(rd_a[1]), .rdata_a(rdata_a[1]), .rd_b(rd_b[1]), .rdata_b(rdata_b[1]), .wr(wr[1]), .ctrl_out(ctrl_out[1]));
  ew_stage #(.OP(OP_CLAMP), .B_MODE(B_NONE))  s_clamp (.clk, .rst_n, .ctrl_in, .group, .konst,
    .rd_a(rd_a[2]), .rdata_a(rdata_a[2]), .rd_b(rd_b[2]), .rdata_b(rdata_b[2]), .wr(wr[2]), .ctrl_out(ctrl_out[2]));

  // operand RAM models and result capture
  for (genvar s = 0; s < NS; s++) begin : g_ram
    always_ff @(posedge clk) begin
      if (rd_a[s].en) rdata_a[s] <= mem_a[rd_a[s].addr];
      if (rd_b[s].en) rdata_b[s] <= mem_b[rd_b[s].addr];
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

  function automatic fix_t mul_ref(fix_t a, fix_t b);
    longint p;
    p = (longint'(a) * longint'(b)) >>> 16;
    return fix_t'(p);
  endfunction

  int lat [NS] = '{1, 1, 1};

  initial begin
    longint t0;
    longint t_done [NS];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int hh, ww, gg;
      hh = 1 + $urandom % 6;
      gg = 1 + $urandom % 4;
      ww = gg * (1 + $urandom % 4);
      group = dim_t'(gg);
      konst = fix_t'(32768 + $urandom % 65536);   // clamp limit 0.5 .. 1.5
      // values up to +-4 with about half of them negative
      for (int k = 0; k < DEPTH; k++) begin
        mem_a[k] = fix_t'(int'($urandom % 524288) - 262144);
        mem_b[k] = fix_t'(int'($urandom % 131072) - 32768);
        for (int s = 0; s < NS; s++) nwr[s][k] = 0;
      end
      @(negedge clk);
      ctrl_in = '{ready: 1, height: dim_t'(hh), width: dim_t'(ww), offset_a: '0, offset_b: '0};
      t0 = cycle;
      @(negedge clk);
      ctrl_in = '0;
      t_done = '{-1, -1, -1};
      while (t_done[0] < 0 || t_done[1] < 0 || t_done[2] < 0) begin
        for (int s = 0; s < NS; s++)
          if (ctrl_out[s].ready) begin
            t_done[s] = cycle - t0;
            checks++;
            if (ctrl_out[s].height != dim_t'(hh) || ctrl_out[s].width != dim_t'(ww)) begin
              failures++;
              $display("FAIL t%0d stage %0d shape", t, s);
            end
          end
        @(negedge clk);
      end
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (t_done[s] != longint'(hh*ww + 5 + lat[s])) begin
          failures++;
          $display("FAIL t%0d stage %0d took %0d clocks for %0d elements", t, s, t_done[s], hh*ww);
        end
      end
      for (int k = 0; k < DEPTH; k++) begin
        fix_t a, e [NS];
        a = mem_a[k];
        e[0] = mul_ref(a, mem_b[k % ww]);
        e[1] = (a < 0) ? mul_ref(a, mem_b[(k % ww) / gg]) : a;
        e[2] = (a > konst) ? konst : (a < -konst) ? -konst : a;
        for (int s = 0; s < NS; s++) begin
          checks++;
          if (k < hh*ww) begin
            if (nwr[s][k] != 1 || res[s][k] != e[s]) begin
              failures++;
              if (failures < 20) $display("FAIL t%0d stage %0d [%0d]: %0d writes, got %0d expected %0d",
                                          t, s, k, nwr[s][k], res[s][k], e[s]);
            end
          end else if (nwr[s][k] != 0) begin
            failures++;
            $display("FAIL t%0d stage %0d wrote outside the tensor at %0d", t, s, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
