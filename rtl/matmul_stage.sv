// matmul_stage: pipelined matrix multiplication C (+)= A * B (the Matmul
// module, in its form split into Matmul_Mul and Matmul_Add).
//
// matmul_index walks the products in the order i, j, k (k innermost) and
// issues one per clock. Generate stages turn its index buses into read
// requests for the A, B and, when use_c is set, C RAMs. Two clocks later the
// operands arrive: Matmul_Mul registers their product; Matmul_Add adds it to
// the running sum of the same C element. That running sum comes from the
// forward_unit: the adder's own previous result when the C address repeats
// (the write of that result has not reached the RAM yet), else the old C
// element (use_c = 1, accumulate onto C) or zero (use_c = 0, C = A*B). Every
// partial sum is written to C through a ToRam stage, so the last write of each
// element leaves the full dot product. Timing: product issued in clock t,
// partial sum written at the end of clock t+5; ctrl_out pulses ready one
// clock after the final write, with the shape heightA x widthB.
// The forwarding distance is one clock, which is all this pipeline needs
// because the adder takes one clock and the products of one element are
// issued back to back.
module matmul_stage
  import fnn_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  index_control_t ctrl_a,
  input  index_control_t ctrl_b,
  input  logic           use_c,
  output rd_ctrl_t       rd_a,
  input  fix_t           rdata_a,
  output rd_ctrl_t       rd_b,
  input  fix_t           rdata_b,
  output rd_ctrl_t       rd_c,
  input  fix_t           rdata_c,
  output wr_ctrl_t       wr_c,
  output index_control_t ctrl_out,
  output logic           dim_error,
  output logic           fwd_hit     // a partial sum was forwarded this clock
);

  index_value_t idx_a, idx_b, idx_c, idx_c_rd;
  logic first, last, busy;
  dim_t out_h, out_w;

  matmul_index u_index (
    .clk, .rst_n, .ctrl_a, .ctrl_b,
    .idx_a, .idx_b, .idx_c, .first, .last, .busy, .dim_error,
    .out_height(out_h), .out_width(out_w)
  );

  // ---- Generate: read requests
  assign idx_c_rd = '{ready: idx_c.ready && use_c, addr: idx_c.addr};
  rd_gen u_gen_a (.clk, .rst_n, .idx(idx_a),    .base('0), .rd(rd_a));
  rd_gen u_gen_b (.clk, .rst_n, .idx(idx_b),    .base('0), .rd(rd_b));
  rd_gen u_gen_c (.clk, .rst_n, .idx(idx_c_rd), .base('0), .rd(rd_c));

  // ---- Pipes: C address beside the operands (2 clocks)
  index_value_t idx_c_d2;
  logic         use_c_d2;
  pipe_reg #(.T(index_value_t), .DEPTH(2)) u_pipe_c   (.clk, .rst_n, .d(idx_c),     .q(idx_c_d2));
  pipe_reg #(.T(logic),         .DEPTH(2)) u_pipe_use (.clk, .rst_n, .d(idx_c_rd.ready), .q(use_c_d2));

  // ---- Matmul_Mul
  fix_t         prod, c_old;
  index_value_t prod_idx;
  logic         prod_c_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod <= '0;
      c_old <= '0;
      prod_idx <= '0;
      prod_c_valid <= 1'b0;
    end else begin
      prod         <= fx_mul(rdata_a, rdata_b);
      c_old        <= rdata_c;
      prod_idx     <= idx_c_d2;
      prod_c_valid <= use_c_d2;
    end
  end

  // ---- Forward + Matmul_Add
  fix_t         sum, fwd_val;
  logic         fwd_match;
  index_value_t sum_idx;
  forward_unit u_fwd (
    .new_idx(sum_idx), .new_val(sum),
    .old_idx('{ready: prod_c_valid, addr: prod_idx.addr}), .old_val(c_old),
    .fwd_val, .fwd_hit(fwd_match)
  );
  assign fwd_hit = fwd_match && prod_idx.ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum     <= '0;
      sum_idx <= '0;
    end else begin
      sum_idx <= prod_idx;
      if (prod_idx.ready) sum <= fx_add(prod, fwd_val);
    end
  end

  // ---- ToRam
  to_ram u_toram (.clk, .rst_n, .idx(sum_idx), .value(sum), .wr(wr_c));

  // ---- control out, one clock after the final write request
  logic last_d;
  pipe_reg #(.T(logic), .DEPTH(5)) u_pipe_last (.clk, .rst_n, .d(last), .q(last_d));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctrl_out <= '0;
    else begin
      ctrl_out.ready    <= last_d;
      ctrl_out.height   <= out_h;
      ctrl_out.width    <= out_w;
      ctrl_out.offset_a <= '0;
      ctrl_out.offset_b <= '0;
    end
  end

  logic unused;
  assign unused = first ^ busy;

endmodule
