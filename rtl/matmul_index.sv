// matmul_index: address generator of the matrix multiplier (the MatmulIndex
// process).
//
// Two control buses describe the operands: ctrl_a an heightA x widthA matrix
// A, ctrl_b an heightB x widthB matrix B, both stored row by row. Their ready
// pulses may come in any order and are remembered; once both have been seen
// the shapes are checked. If widthA != heightB, dim_error is set (until the
// next start) and nothing is issued. Otherwise the generator walks
//   for i < heightA, for j < widthB, for k < widthA
// issuing one product per clock: idx_a = offset_a + i*widthA + k,
// idx_b = offset_b + k*widthB + j and idx_c = i*widthB + j, the element of
// C = A*B the product belongs to. first marks k = 0 and last the final
// product. Addresses are kept as running sums, so no multiplier is needed.
// Outputs are registered; the first product is on the outputs three clocks
// after the later of the two ready pulses. Ready pulses that arrive during a
// walk are ignored.
module matmul_index
  import fnn_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  index_control_t ctrl_a,
  input  index_control_t ctrl_b,
  output index_value_t   idx_a,
  output index_value_t   idx_b,
  output index_value_t   idx_c,
  output logic           first,
  output logic           last,
  output logic           busy,
  output logic           dim_error,
  output dim_t           out_height,  // heightA of the current product
  output dim_t           out_width    // widthB of the current product
);

  index_control_t ca, cb;
  logic  seen_a, seen_b;
  dim_t  i, j, k;
  addr_t a_row, a_addr, b_addr, c_addr;

  assign out_height = ca.height;
  assign out_width  = cb.width;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {ca, cb} <= '0;
      {seen_a, seen_b, busy, dim_error, first, last} <= '0;
      {idx_a, idx_b, idx_c} <= '0;
      {i, j, k, a_row, a_addr, b_addr, c_addr} <= '0;
    end else if (!busy) begin
      idx_a.ready <= 1'b0;
      idx_b.ready <= 1'b0;
      idx_c.ready <= 1'b0;
      first <= 1'b0;
      last  <= 1'b0;
      if (ctrl_a.ready) begin
        ca <= ctrl_a;
        seen_a <= 1'b1;
      end
      if (ctrl_b.ready) begin
        cb <= ctrl_b;
        seen_b <= 1'b1;
      end
      if (seen_a && seen_b) begin
        seen_a <= 1'b0;
        seen_b <= 1'b0;
        if (ca.width != cb.height || ca.height == 0 || ca.width == 0 || cb.width == 0) begin
          dim_error <= 1'b1;
        end else begin
          dim_error <= 1'b0;
          busy   <= 1'b1;
          {i, j, k} <= '0;
          a_row  <= ca.offset_a;
          a_addr <= ca.offset_a;
          b_addr <= cb.offset_b;
          c_addr <= '0;
        end
      end
    end else begin
      idx_a <= '{ready: 1'b1, addr: a_addr};
      idx_b <= '{ready: 1'b1, addr: b_addr};
      idx_c <= '{ready: 1'b1, addr: c_addr};
      first <= (k == 0);
      last  <= (i == ca.height - 1) && (j == cb.width - 1) && (k == ca.width - 1);
      if (k == ca.width - 1) begin
        k      <= '0;
        c_addr <= c_addr + 1;
        if (j == cb.width - 1) begin
          j      <= '0;
          b_addr <= cb.offset_b;
          a_row  <= a_row + addr_t'(ca.width);
          a_addr <= a_row + addr_t'(ca.width);
          if (i == ca.height - 1) busy <= 1'b0;
          i <= i + 1;
        end else begin
          j      <= j + 1;
          b_addr <= cb.offset_b + addr_t'(j) + 1;
          a_addr <= a_row;
        end
      end else begin
        k      <= k + 1;
        a_addr <= a_addr + 1;
        b_addr <= b_addr + addr_t'(cb.width);
      end
    end
  end

endmodule
