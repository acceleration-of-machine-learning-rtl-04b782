// tb_fnn_full: end-to-end test of fnn_top at its default size: input 256,
// hidden 96, 16 networks, batch 1, the size of the production network.
// fnn_top is instantiated with no parameter overrides.
//
// It loads random parameters chosen so that every mechanism of the design is
// exercised, runs the pipeline twice with different data, and compares
// the first-layer result h and the final predictions y with the floating
// point reference model (fnn_ref_pkg). It counts, and requires at least once
// each: a forwarded partial sum in the matrix multiplier, negative PReLU
// inputs, predictions clipped at +max and at -max, the join of the two
// branches holding a finished branch, and a start ignored while busy. The
// run time from start to done is checked against the stage latencies.
`timescale 1ns/1ps
module tb_fnn_full;
  import fnn_pkg::*;
  import fnn_ref_pkg::*;

  localparam int B = 1, I = 256, H = 96, N = 16, NH = N*H;
  localparam int RUNS = 2;
  localparam real TOL_H = 0.005, TOL_Y = 0.02;
  localparam int OVERHEAD = 84;   // clocks of pipeline fill and hand-over along the chain

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic      load_en = 0;
  load_sel_e load_sel = LD_W0;
  addr_t     load_addr = '0;
  fix_t      load_data = '0;
  logic      start = 0, busy, done, dim_error;
  rd_ctrl_t  y_rd = '0;
  fix_t      y_rdata;

  fnn_top dut (.*);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_neg = 0, n_hi = 0, n_lo = 0, n_wait = 0, n_ignored = 0;
  longint cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (dut.mm_fwd_hit) n_fwd++;
    if (dut.join_waited) n_wait++;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(load_sel_e sel, int v[]);
    foreach (v[k]) begin
      @(negedge clk);
      load_en = 1; load_sel = sel; load_addr = addr_t'(k); load_data = v[k];
    end
    @(negedge clk);
    load_en = 0;
  endtask

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  int w0[], x[], pz[], pr[], wz[], wr[], zs[];
  real h_ref[], y_ref[];
  int neg, hi, lo;
  longint t0, t1;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < RUNS; run++) begin
      w0 = new[NH*I]; x = new[B*I]; pz = new[N]; pr = new[N];
      wz = new[NH]; wr = new[NH]; zs = new[N];
      foreach (w0[k]) w0[k] = rand_fix(-0.1, 0.1);
      foreach (x[k])  x[k]  = rand_fix(-1.0, 1.0);
      foreach (pz[k]) pz[k] = rand_fix(0.0, 0.3);
      foreach (pr[k]) pr[k] = rand_fix(0.0, 0.3);
      // per network a different weight scale, so that some predictions
      // clip high, some clip low and some stay inside
      foreach (wz[k]) wz[k] = rand_fix(-0.4, 0.4);
      foreach (wr[k]) wr[k] = rand_fix(-0.1, 0.4);
      foreach (zs[k]) zs[k] = rand_fix(0.5, 3.0);
      fnn_ref(B, I, H, N, w0, x, pz, pr, wz, wr, zs, 1.0, h_ref, y_ref, neg, hi, lo);
      n_neg += neg; n_hi += hi; n_lo += lo;

      load(LD_W0, w0); load(LD_X, x); load(LD_PZ, pz); load(LD_PR, pr);
      load(LD_WZ, wz); load(LD_WR, wr); load(LD_ZS, zs);

      @(negedge clk);
      start = 1;
      t0 = cycle;
      @(negedge clk);
      start = 0;
      // a second start during the run must be ignored
      repeat (5) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      if (busy) n_ignored++;
      while (!done) @(negedge clk);
      t1 = cycle;

      checks++;
      if (dim_error) begin
        failures++;
        $display("FAIL dim_error set");
      end

      // latency: one clock per element walked by each stage on the longer
      // branch, plus the fixed pipeline and hand-over overhead of the chain
      checks++;
      if (t1 - t0 != longint'(NH*I + B*I*NH + 3*B*NH + 6*B*N + OVERHEAD)) begin
        failures++;
        $display("FAIL run %0d took %0d clocks, expected %0d", run, t1 - t0,
                 NH*I + B*I*NH + 3*B*NH + 6*B*N + OVERHEAD);
      end

      foreach (h_ref[k]) check($sformatf("run %0d h[%0d]", run, k), to_r(dut.m_h.mem[k]), h_ref[k], TOL_H);
      for (int b = 0; b < B; b++) begin
        @(negedge clk);
        y_rd = '{en: 1'b1, addr: addr_t'(b)};
        @(negedge clk);
        y_rd = '0;
        check($sformatf("run %0d y[%0d]", run, b), to_r(y_rdata), y_ref[b], TOL_Y);
      end
    end

    checks += 6;
    if (n_fwd == 0)     begin failures++; $display("FAIL no forwarded partial sum"); end
    if (n_neg == 0)     begin failures++; $display("FAIL no negative PReLU input"); end
    if (n_hi == 0)      begin failures++; $display("FAIL no prediction clipped high"); end
    if (n_lo == 0)      begin failures++; $display("FAIL no prediction clipped low"); end
    if (n_wait == 0)    begin failures++; $display("FAIL join never held a branch"); end
    if (n_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    $display("mechanisms: forward=%0d prelu_neg=%0d clip_hi=%0d clip_lo=%0d join_wait=%0d start_ignored=%0d",
             n_fwd, n_neg, n_hi, n_lo, n_wait, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
