// transpose_stage: writes the transpose of a matrix from one RAM into another
// (the Transpose module with its TransposeIndex process).
//
// A ready pulse on ctrl_in starts it on a height x width matrix stored row by
// row at offset_a of the source RAM. Its index process walks the result in
// storage order: for i < width, for j < height it reads source element
// offset_a + j*width + i and writes it to offset_b + i*height + j of the
// destination RAM, one element per clock. The read request is registered in
// a Generate stage, the write address travels through two pipe registers
// next to the RAM read and the write request is registered in a ToRam stage,
// so an element read in clock t is stored at the end of clock t+3. One clock
// after the last write, ctrl_out pulses ready with the shape of the result
// (width x height). Running addresses replace the products, so no multiplier
// is needed.
module transpose_stage
  import fnn_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  index_control_t ctrl_in,
  output rd_ctrl_t       rd,
  input  fix_t           rdata,
  output wr_ctrl_t       wr,
  output index_control_t ctrl_out
);

  // ---- TransposeIndex
  dim_t  height, width, i, j;
  addr_t off_b, col_base, src, dst;
  logic  busy;
  index_value_t idx_rd, idx_wr;
  logic  last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {busy, last} <= '0;
      {idx_rd, idx_wr} <= '0;
      {height, width, i, j, off_b, col_base, src, dst} <= '0;
    end else if (!busy) begin
      idx_rd.ready <= 1'b0;
      idx_wr.ready <= 1'b0;
      last <= 1'b0;
      if (ctrl_in.ready && ctrl_in.height != 0 && ctrl_in.width != 0) begin
        busy     <= 1'b1;
        height   <= ctrl_in.height;
        width    <= ctrl_in.width;
        off_b    <= ctrl_in.offset_b;
        col_base <= ctrl_in.offset_a;
        src      <= ctrl_in.offset_a;
        dst      <= ctrl_in.offset_b;
        {i, j}   <= '0;
      end
    end else begin
      idx_rd <= '{ready: 1'b1, addr: src};
      idx_wr <= '{ready: 1'b1, addr: dst};
      last   <= (i == width - 1) && (j == height - 1);
      dst    <= dst + 1;
      if (j == height - 1) begin
        j        <= '0;
        i        <= i + 1;
        col_base <= col_base + 1;
        src      <= col_base + 1;
        if (i == width - 1) busy <= 1'b0;
      end else begin
        j   <= j + 1;
        src <= src + addr_t'(width);
      end
    end
  end

  // ---- Generate: read request to the source RAM
  rd_gen u_gen (.clk, .rst_n, .idx(idx_rd), .base('0), .rd);

  // ---- Pipes: keep the write address and the last flag beside the data
  index_value_t idx_wr_d;
  logic         last_d;
  pipe_reg #(.T(index_value_t), .DEPTH(2)) u_pipe_addr (.clk, .rst_n, .d(idx_wr), .q(idx_wr_d));
  pipe_reg #(.T(logic),         .DEPTH(3)) u_pipe_last (.clk, .rst_n, .d(last),   .q(last_d));

  // ---- ToRam: write request to the destination RAM
  to_ram u_toram (.clk, .rst_n, .idx(idx_wr_d), .value(rdata), .wr);

  // ---- control out, one clock after the last write request
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctrl_out <= '0;
    else begin
      ctrl_out.ready    <= last_d;
      ctrl_out.height   <= width;
      ctrl_out.width    <= height;
      ctrl_out.offset_a <= off_b;
      ctrl_out.offset_b <= '0;
    end
  end

endmodule
