// ew_stage: one element-wise stage of the pipeline: an ew_index address
// generator, Generate stages for one or two operand RAMs, a compute unit, the
// pipes that keep the output address beside the data, and a ToRam stage.
//
// OP selects the compute unit (prelu_unit, mul_unit, sigmoid_unit,
// mulmin_unit, softplus_unit or clamp_unit) and B_MODE how the second
// operand is addressed (see ew_index). With B_MODE = B_NONE the second
// operand is the constant konst instead (max_predict for the clamp). A ready
// pulse on ctrl_in starts a walk over the height x width tensor; one element
// per clock is read, computed and written to the output RAM at the same flat
// address. An element issued in clock t is written at the end of clock
// t+3+L, L being the unit's latency (op_latency). ctrl_out pulses ready one
// clock after the last write, with the shape of the tensor.
module ew_stage
  import fnn_pkg::*;
#(
  parameter ew_op_e  OP     = OP_MUL,
  parameter b_mode_e B_MODE = B_SAME
) (
  input  logic           clk,
  input  logic           rst_n,
  input  index_control_t ctrl_in,
  input  dim_t           group,
  input  fix_t           konst,
  output rd_ctrl_t       rd_a,
  input  fix_t           rdata_a,
  output rd_ctrl_t       rd_b,
  input  fix_t           rdata_b,
  output wr_ctrl_t       wr,
  output index_control_t ctrl_out
);

  localparam int L = op_latency(OP);

  index_value_t idx_a, idx_b, idx_o;
  logic last, busy;

  ew_index #(.B_MODE(B_MODE)) u_index (
    .clk, .rst_n, .ctrl(ctrl_in), .group, .idx_a, .idx_b, .idx_o, .last, .busy
  );

  rd_gen u_gen_a (.clk, .rst_n, .idx(idx_a), .base('0), .rd(rd_a));
  rd_gen u_gen_b (.clk, .rst_n, .idx(idx_b), .base('0), .rd(rd_b));

  fix_t opb, y;
  assign opb = (B_MODE == B_NONE) ? konst : rdata_b;

  if (OP == OP_PRELU) begin : g_unit
    prelu_unit    u_unit (.clk, .a(rdata_a), .b(opb), .y);
  end else if (OP == OP_MUL) begin : g_unit
    mul_unit      u_unit (.clk, .a(rdata_a), .b(opb), .y);
  end else if (OP == OP_SIGMOID) begin : g_unit
    sigmoid_unit  u_unit (.clk, .a(rdata_a), .b(opb), .y);
  end else if (OP == OP_MULMIN) begin : g_unit
    mulmin_unit   u_unit (.clk, .a(rdata_a), .b(opb), .y);
  end else if (OP == OP_SOFTPLUS) begin : g_unit
    softplus_unit u_unit (.clk, .a(rdata_a), .b(opb), .y);
  end else begin : g_unit
    clamp_unit    u_unit (.clk, .a(rdata_a), .b(opb), .y);
  end

  index_value_t idx_o_d;
  logic         last_d;
  pipe_reg #(.T(index_value_t), .DEPTH(2+L)) u_pipe_o    (.clk, .rst_n, .d(idx_o), .q(idx_o_d));
  pipe_reg #(.T(logic),         .DEPTH(3+L)) u_pipe_last (.clk, .rst_n, .d(last),  .q(last_d));

  to_ram u_toram (.clk, .rst_n, .idx(idx_o_d), .value(y), .wr);

  dim_t h_q, w_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_out <= '0;
      h_q <= '0;
      w_q <= '0;
    end else begin
      if (ctrl_in.ready && !busy) begin
        h_q <= ctrl_in.height;
        w_q <= ctrl_in.width;
      end
      ctrl_out <= '{ready: last_d, height: h_q, width: w_q, offset_a: '0, offset_b: '0};
    end
  end

endmodule
