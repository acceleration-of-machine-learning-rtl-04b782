// reduce_index: address generator of a reduction over the last axis (the
// SLAIndex processes).
//
// A ready pulse on ctrl starts a walk over a height x width tensor stored row
// by row; one element is issued per clock. idx_a carries the input address
// offset_a + row*width + col and idx_o the output address, the row number.
// first marks col = 0 (start a new sum), save marks col = width-1 (the sum
// of the row is complete) and last marks the final element. Outputs are
// registered; the first element is issued in the clock after the ctrl pulse.
// A ctrl pulse during a walk is ignored.
module reduce_index
  import fnn_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  index_control_t ctrl,
  output index_value_t   idx_a,
  output index_value_t   idx_o,
  output logic           first,
  output logic           save,
  output logic           last,
  output logic           busy
);

  dim_t  height, width, row, col;
  addr_t off_a, n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx_a <= '0;
      idx_o <= '0;
      first <= 1'b0;
      save  <= 1'b0;
      last  <= 1'b0;
      {height, width, row, col, off_a, n} <= '0;
    end else if (!busy) begin
      idx_a.ready <= 1'b0;
      idx_o.ready <= 1'b0;
      first <= 1'b0;
      save  <= 1'b0;
      last  <= 1'b0;
      if (ctrl.ready && ctrl.height != 0 && ctrl.width != 0) begin
        busy   <= 1'b1;
        height <= ctrl.height;
        width  <= ctrl.width;
        off_a  <= ctrl.offset_a;
        {row, col, n} <= '0;
      end
    end else begin
      idx_a <= '{ready: 1'b1, addr: off_a + n};
      idx_o <= '{ready: 1'b1, addr: addr_t'(row)};
      first <= (col == 0);
      save  <= (col == width - 1);
      last  <= (row == height - 1) && (col == width - 1);
      n <= n + 1;
      if (col == width - 1) begin
        col <= '0;
        row <= row + 1;
        if (row == height - 1) busy <= 1'b0;
      end else begin
        col <= col + 1;
      end
    end
  end

endmodule
