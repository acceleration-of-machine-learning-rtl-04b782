// fnn_top: inference pipeline of an ensemble of small two-layer feed-forward
// networks, as used to predict price moves from market data.
//
// For each input row x (INPUT_SIZE values) and each of NETS networks n:
//   h     = x * W0^T                       first layer, all networks at once
//   hz,hr = PReLU(h, pz[n]), PReLU(h, pr[n])
//   z     = sum_k hz[n,k]*Wz[n,k]          r = sum_k hr[n,k]*Wr[n,k]
//   y_n   = softplus(r) * (2*sigmoid(z_scale[n]*z) - 1)
//   y     = mean_n clamp(y_n, -MAX_PREDICT, MAX_PREDICT)
//
// The computation is a chain of stages, each a small pipeline that walks one
// tensor element per clock from one RAM into the next:
//   transpose W0 -> matmul -> (Hz -> z mul -> SLA_z -> zz -> sigmoid -> mulmin)
//                             (Hr -> r mul -> SLA_r -> softplus)
//                          -> join -> rz -> clamp -> mean
// A stage is started by a ready pulse on its control bus, which also carries
// the shape it walks; when its last result is written it pulses the control
// bus of the next stage, through one pipe register. The Hz/Hr and z/r stages
// run side by side; the product rz waits for both branches.
//
// Use: load the seven parameter tensors through the load port (one element
// per clock, load_sel picks the RAM, addresses are flat row-major), pulse
// start, wait for done, then read the BATCH results through the y read port
// (data one clock after the request). A run takes about
// 2*NETS*HIDDEN*INPUT_SIZE clocks for the transpose and the matrix product,
// plus a few times BATCH*NETS*HIDDEN for the rest. Loading must not overlap
// a run. start is ignored while busy.
//
// Numbers are fixed point (fnn_pkg). The stage chain and the split of the
// work follow the reference design; the fixed-point format, the function
// approximations, the load and result ports and the RAM organisation
// (one RAM per tensor) are this design's choices.
module fnn_top
  import fnn_pkg::*;
#(
  parameter int   BATCH       = 1,
  parameter int   INPUT_SIZE  = 256,
  parameter int   HIDDEN      = 96,
  parameter int   NETS        = 16,
  parameter fix_t MAX_PREDICT = FX_ONE
) (
  input  logic      clk,
  input  logic      rst_n,
  // parameter and input load port
  input  logic      load_en,
  input  load_sel_e load_sel,
  input  addr_t     load_addr,
  input  fix_t      load_data,
  // run control
  input  logic      start,
  output logic      busy,
  output logic      done,       // one-clock pulse when y is complete
  output logic      dim_error,  // matmul operand shapes disagree
  // result read port
  input  rd_ctrl_t  y_rd,
  output fix_t      y_rdata
);

  localparam int NH = NETS * HIDDEN;

  // ------------------------------------------------------------------
  // Load port
  function automatic wr_ctrl_t ld(load_sel_e sel);
    return '{en: load_en && load_sel == sel, addr: load_addr, data: load_data};
  endfunction

  // ------------------------------------------------------------------
  // RAMs, one per tensor
  wr_ctrl_t w_w0t, w_h, w_hz, w_hr, w_ze, w_re, w_z, w_r, w_zz, w_sg, w_mm, w_sp, w_rz, w_cl, w_y;
  rd_ctrl_t r_w0, r_w0t, r_x, r_h, r_pz, r_pr, r_hz, r_hr, r_wz, r_wr, r_ze, r_re, r_z, r_r,
            r_zs, r_zz, r_sg, r_mm, r_sp, r_rz, r_cl;
  fix_t     d_w0, d_w0t, d_x, d_h, d_pz, d_pr, d_hz, d_hr, d_wz, d_wr, d_ze, d_re, d_z, d_r,
            d_zs, d_zz, d_sg, d_mm, d_sp, d_rz, d_cl;

  dp_ram #(.DEPTH(NH*INPUT_SIZE))    m_w0  (.clk, .wr(ld(LD_W0)), .rd(r_w0),  .rdata(d_w0));
  dp_ram #(.DEPTH(NH*INPUT_SIZE))    m_w0t (.clk, .wr(w_w0t),     .rd(r_w0t), .rdata(d_w0t));
  dp_ram #(.DEPTH(BATCH*INPUT_SIZE)) m_x   (.clk, .wr(ld(LD_X)),  .rd(r_x),   .rdata(d_x));
  dp_ram #(.DEPTH(BATCH*NH))         m_h   (.clk, .wr(w_h),       .rd(r_h),   .rdata(d_h));
  dp_ram #(.DEPTH(NETS))             m_pz  (.clk, .wr(ld(LD_PZ)), .rd(r_pz),  .rdata(d_pz));
  dp_ram #(.DEPTH(NETS))             m_pr  (.clk, .wr(ld(LD_PR)), .rd(r_pr),  .rdata(d_pr));
  dp_ram #(.DEPTH(BATCH*NH))         m_hz  (.clk, .wr(w_hz),      .rd(r_hz),  .rdata(d_hz));
  dp_ram #(.DEPTH(BATCH*NH))         m_hr  (.clk, .wr(w_hr),      .rd(r_hr),  .rdata(d_hr));
  dp_ram #(.DEPTH(NH))               m_wz  (.clk, .wr(ld(LD_WZ)), .rd(r_wz),  .rdata(d_wz));
  dp_ram #(.DEPTH(NH))               m_wr  (.clk, .wr(ld(LD_WR)), .rd(r_wr),  .rdata(d_wr));
  dp_ram #(.DEPTH(BATCH*NH))         m_ze  (.clk, .wr(w_ze),      .rd(r_ze),  .rdata(d_ze));
  dp_ram #(.DEPTH(BATCH*NH))         m_re  (.clk, .wr(w_re),      .rd(r_re),  .rdata(d_re));
  dp_ram #(.DEPTH(BATCH*NETS))       m_z   (.clk, .wr(w_z),       .rd(r_z),   .rdata(d_z));
  dp_ram #(.DEPTH(BATCH*NETS))       m_r   (.clk, .wr(w_r),       .rd(r_r),   .rdata(d_r));
  dp_ram #(.DEPTH(NETS))             m_zs  (.clk, .wr(ld(LD_ZS)), .rd(r_zs),  .rdata(d_zs));
  dp_ram #(.DEPTH(BATCH*NETS))       m_zz  (.clk, .wr(w_zz),      .rd(r_zz),  .rdata(d_zz));
  dp_ram #(.DEPTH(BATCH*NETS))       m_sg  (.clk, .wr(w_sg),      .rd(r_sg),  .rdata(d_sg));
  dp_ram #(.DEPTH(BATCH*NETS))       m_mm  (.clk, .wr(w_mm),      .rd(r_mm),  .rdata(d_mm));
  dp_ram #(.DEPTH(BATCH*NETS))       m_sp  (.clk, .wr(w_sp),      .rd(r_sp),  .rdata(d_sp));
  dp_ram #(.DEPTH(BATCH*NETS))       m_rz  (.clk, .wr(w_rz),      .rd(r_rz),  .rdata(d_rz));
  dp_ram #(.DEPTH(BATCH*NETS))       m_cl  (.clk, .wr(w_cl),      .rd(r_cl),  .rdata(d_cl));
  dp_ram #(.DEPTH(BATCH))            m_y   (.clk, .wr(w_y),       .rd(y_rd),  .rdata(y_rdata));

  // ------------------------------------------------------------------
  // Control chain
  index_control_t c_start_t, c_start_x, c_tr, c_mm, c_hz, c_hr, c_mz, c_mr, c_sz, c_sr,
                  c_zz, c_sg, c_mm2, c_sp, c_join, c_rz, c_cl, c_mean;
  index_control_t p_tr, p_mm, p_hz, p_hr, p_mz, p_mr, p_sz, p_sr, p_zz, p_sg, p_mm2, p_sp,
                  p_join, p_rz, p_cl;
  logic go, join_waited, mm_fwd_hit;

  assign go        = start && !busy;
  assign c_start_t = mk_ctrl(go, NH, INPUT_SIZE);      // W0: (NETS*HIDDEN) x INPUT_SIZE
  assign c_start_x = mk_ctrl(go, BATCH, INPUT_SIZE);   // x:  BATCH x INPUT_SIZE

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= c_mean.ready;
      if (go) busy <= 1'b1;
      else if (c_mean.ready || dim_error) busy <= 1'b0;
    end
  end

  // Pipe_control registers between the stages
  pipe_reg #(.T(index_control_t)) pc_tr  (.clk, .rst_n, .d(c_tr),   .q(p_tr));
  pipe_reg #(.T(index_control_t)) pc_mm  (.clk, .rst_n, .d(c_mm),   .q(p_mm));
  pipe_reg #(.T(index_control_t)) pc_hz  (.clk, .rst_n, .d(c_hz),   .q(p_hz));
  pipe_reg #(.T(index_control_t)) pc_hr  (.clk, .rst_n, .d(c_hr),   .q(p_hr));
  pipe_reg #(.T(index_control_t)) pc_mz  (.clk, .rst_n, .d(c_mz),   .q(p_mz));
  pipe_reg #(.T(index_control_t)) pc_mr  (.clk, .rst_n, .d(c_mr),   .q(p_mr));
  pipe_reg #(.T(index_control_t)) pc_sz  (.clk, .rst_n, .d(c_sz),   .q(p_sz));
  pipe_reg #(.T(index_control_t)) pc_sr  (.clk, .rst_n, .d(c_sr),   .q(p_sr));
  pipe_reg #(.T(index_control_t)) pc_zz  (.clk, .rst_n, .d(c_zz),   .q(p_zz));
  pipe_reg #(.T(index_control_t)) pc_sg  (.clk, .rst_n, .d(c_sg),   .q(p_sg));
  pipe_reg #(.T(index_control_t)) pc_mm2 (.clk, .rst_n, .d(c_mm2),  .q(p_mm2));
  pipe_reg #(.T(index_control_t)) pc_sp  (.clk, .rst_n, .d(c_sp),   .q(p_sp));
  pipe_reg #(.T(index_control_t)) pc_jn  (.clk, .rst_n, .d(c_join), .q(p_join));
  pipe_reg #(.T(index_control_t)) pc_rz  (.clk, .rst_n, .d(c_rz),   .q(p_rz));
  pipe_reg #(.T(index_control_t)) pc_cl  (.clk, .rst_n, .d(c_cl),   .q(p_cl));

  // ------------------------------------------------------------------
  // Transpose: W0 ((NETS*HIDDEN) x INPUT_SIZE) -> W0^T (INPUT_SIZE x NETS*HIDDEN)
  transpose_stage u_transpose (
    .clk, .rst_n, .ctrl_in(c_start_t), .rd(r_w0), .rdata(d_w0), .wr(w_w0t), .ctrl_out(c_tr)
  );

  // Matmul: h = x * W0^T (BATCH x NETS*HIDDEN), no prior contents of C
  rd_ctrl_t mm_rd_c, hz_rd_a, hr_rd_a;
  matmul_stage u_matmul (
    .clk, .rst_n, .ctrl_a(c_start_x), .ctrl_b(p_tr), .use_c(1'b0),
    .rd_a(r_x), .rdata_a(d_x), .rd_b(r_w0t), .rdata_b(d_w0t),
    .rd_c(mm_rd_c), .rdata_c(d_h), .wr_c(w_h),
    .ctrl_out(c_mm), .dim_error, .fwd_hit(mm_fwd_hit)
  );

  // The Hz and Hr stages start together and walk h in lock step, so they
  // share the read port of the h RAM; the matmul reads it only when it
  // accumulates onto C.
  assign r_h = mm_rd_c.en ? mm_rd_c : hz_rd_a;

  // Hz / Hr: PReLU with one slope per network (group of HIDDEN columns)
  ew_stage #(.OP(OP_PRELU), .B_MODE(B_GROUP)) u_hz (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_mm.ready, BATCH, NH)), .group(dim_t'(HIDDEN)), .konst('0),
    .rd_a(hz_rd_a), .rdata_a(d_h), .rd_b(r_pz), .rdata_b(d_pz), .wr(w_hz), .ctrl_out(c_hz)
  );
  ew_stage #(.OP(OP_PRELU), .B_MODE(B_GROUP)) u_hr (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_mm.ready, BATCH, NH)), .group(dim_t'(HIDDEN)), .konst('0),
    .rd_a(hr_rd_a), .rdata_a(d_h), .rd_b(r_pr), .rdata_b(d_pr), .wr(w_hr), .ctrl_out(c_hr)
  );

  // z, r: element-wise product with the second-layer weights, broadcast over rows
  ew_stage #(.OP(OP_MUL), .B_MODE(B_COL)) u_mz (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_hz.ready, BATCH, NH)), .group('0), .konst('0),
    .rd_a(r_hz), .rdata_a(d_hz), .rd_b(r_wz), .rdata_b(d_wz), .wr(w_ze), .ctrl_out(c_mz)
  );
  ew_stage #(.OP(OP_MUL), .B_MODE(B_COL)) u_mr (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_hr.ready, BATCH, NH)), .group('0), .konst('0),
    .rd_a(r_hr), .rdata_a(d_hr), .rd_b(r_wr), .rdata_b(d_wr), .wr(w_re), .ctrl_out(c_mr)
  );

  // SLA_z, SLA_r: sum over the HIDDEN axis, viewing the products as (BATCH*NETS) x HIDDEN
  reduce_stage #(.MEAN(1'b0)) u_sla_z (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_mz.ready, BATCH*NETS, HIDDEN)),
    .rd_a(r_ze), .rdata_a(d_ze), .wr(w_z), .ctrl_out(c_sz)
  );
  reduce_stage #(.MEAN(1'b0)) u_sla_r (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_mr.ready, BATCH*NETS, HIDDEN)),
    .rd_a(r_re), .rdata_a(d_re), .wr(w_r), .ctrl_out(c_sr)
  );

  // zz: z * z_scale[n]
  ew_stage #(.OP(OP_MUL), .B_MODE(B_COL)) u_zz (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_sz.ready, BATCH, NETS)), .group('0), .konst('0),
    .rd_a(r_z), .rdata_a(d_z), .rd_b(r_zs), .rdata_b(d_zs), .wr(w_zz), .ctrl_out(c_zz)
  );

  // Sigmoid, then Mulmin: 2*sigmoid - 1
  rd_ctrl_t nc_b0, nc_b1, nc_b2, nc_b3;
  ew_stage #(.OP(OP_SIGMOID), .B_MODE(B_NONE)) u_sig (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_zz.ready, BATCH, NETS)), .group('0), .konst('0),
    .rd_a(r_zz), .rdata_a(d_zz), .rd_b(nc_b0), .rdata_b('0), .wr(w_sg), .ctrl_out(c_sg)
  );
  ew_stage #(.OP(OP_MULMIN), .B_MODE(B_NONE)) u_mulmin (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_sg.ready, BATCH, NETS)), .group('0), .konst('0),
    .rd_a(r_sg), .rdata_a(d_sg), .rd_b(nc_b1), .rdata_b('0), .wr(w_mm), .ctrl_out(c_mm2)
  );

  // Softplus on the r branch
  ew_stage #(.OP(OP_SOFTPLUS), .B_MODE(B_NONE)) u_soft (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_sr.ready, BATCH, NETS)), .group('0), .konst('0),
    .rd_a(r_r), .rdata_a(d_r), .rd_b(nc_b2), .rdata_b('0), .wr(w_sp), .ctrl_out(c_sp)
  );

  // rz waits for both branches
  ctrl_join u_join (.clk, .rst_n, .ctrl_a(p_mm2), .ctrl_b(p_sp), .ctrl_out(c_join), .waited(join_waited));

  ew_stage #(.OP(OP_MUL), .B_MODE(B_SAME)) u_rz (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_join.ready, BATCH, NETS)), .group('0), .konst('0),
    .rd_a(r_sp), .rdata_a(d_sp), .rd_b(r_mm), .rdata_b(d_mm), .wr(w_rz), .ctrl_out(c_rz)
  );

  // Clamp to [-MAX_PREDICT, MAX_PREDICT]
  ew_stage #(.OP(OP_CLAMP), .B_MODE(B_NONE)) u_clamp (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_rz.ready, BATCH, NETS)), .group('0), .konst(MAX_PREDICT),
    .rd_a(r_rz), .rdata_a(d_rz), .rd_b(nc_b3), .rdata_b('0), .wr(w_cl), .ctrl_out(c_cl)
  );

  // Mean over the networks
  reduce_stage #(.MEAN(1'b1)) u_mean (
    .clk, .rst_n, .ctrl_in(mk_ctrl(p_cl.ready, BATCH, NETS)),
    .rd_a(r_cl), .rdata_a(d_cl), .wr(w_y), .ctrl_out(c_mean)
  );

  // Rules of the shared h read port
  always_ff @(posedge clk) begin
    if (hz_rd_a.en || hr_rd_a.en)
      assert (hz_rd_a == hr_rd_a) else $error("fnn_top: Hz and Hr out of lock step");
    assert (!(mm_rd_c.en && hz_rd_a.en)) else $error("fnn_top: h read port conflict");
  end

  logic unused;
  assign unused = ^{nc_b0, nc_b1, nc_b2, nc_b3, mm_fwd_hit, join_waited, p_join, c_rz, c_mean};

endmodule
