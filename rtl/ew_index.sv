// ew_index: address generator of an element-wise stage (the HzIndex, ZIndex,
// MulIndex, SigIndex and SigIndex_flag processes).
//
// A ready pulse on ctrl starts a walk over a height x width tensor stored row
// by row. One element is issued per clock: idx_o carries the flat element
// number n = row*width + col (the output address), idx_a the address of the
// first operand (offset_a + n) and idx_b that of the second operand, chosen by
// B_MODE:
//   B_SAME  offset_b + n            (two tensors of the same shape)
//   B_COL   offset_b + col          (a row vector broadcast over the rows)
//   B_GROUP offset_b + col / group  (one value per group of columns, e.g. one
//                                    PReLU slope per network)
//   B_NONE  idx_b is never ready.
// last marks the final element. A ctrl pulse that arrives while a walk is
// running is ignored. All outputs are registered; the first element is issued
// in the clock after the ctrl pulse. The column/group bookkeeping uses
// counters, so no multiplier or divider is needed.
module ew_index
  import fnn_pkg::*;
#(
  parameter b_mode_e B_MODE = B_SAME
) (
  input  logic           clk,
  input  logic           rst_n,
  input  index_control_t ctrl,
  input  dim_t           group,     // columns per group, for B_GROUP
  output index_value_t   idx_a,
  output index_value_t   idx_b,
  output index_value_t   idx_o,
  output logic           last,
  output logic           busy
);

  dim_t  height, width, grp;
  addr_t off_a, off_b;
  dim_t  row, col, gcnt;
  addr_t n, gidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx_a <= '0;
      idx_b <= '0;
      idx_o <= '0;
      last  <= 1'b0;
      {height, width, grp, off_a, off_b, row, col, gcnt, n, gidx} <= '0;
    end else if (!busy) begin
      idx_a.ready <= 1'b0;
      idx_b.ready <= 1'b0;
      idx_o.ready <= 1'b0;
      last        <= 1'b0;
      if (ctrl.ready && ctrl.height != 0 && ctrl.width != 0) begin
        busy   <= 1'b1;
        height <= ctrl.height;
        width  <= ctrl.width;
        grp    <= (group == 0) ? dim_t'(1) : group;
        off_a  <= ctrl.offset_a;
        off_b  <= ctrl.offset_b;
        {row, col, gcnt, n, gidx} <= '0;
      end
    end else begin
      idx_o <= '{ready: 1'b1, addr: n};
      idx_a <= '{ready: 1'b1, addr: off_a + n};
      case (B_MODE)
        B_SAME:  idx_b <= '{ready: 1'b1, addr: off_b + n};
        B_COL:   idx_b <= '{ready: 1'b1, addr: off_b + addr_t'(col)};
        B_GROUP: idx_b <= '{ready: 1'b1, addr: off_b + gidx};
        default: idx_b <= '0;
      endcase
      last <= (row == height - 1) && (col == width - 1);
      n <= n + 1;
      if (col == width - 1) begin
        col  <= '0;
        gcnt <= '0;
        gidx <= '0;
        row  <= row + 1;
        if (row == height - 1) busy <= 1'b0;
      end else begin
        col <= col + 1;
        if (gcnt == grp - 1) begin
          gcnt <= '0;
          gidx <= gidx + 1;
        end else begin
          gcnt <= gcnt + 1;
        end
      end
    end
  end

endmodule
