// rd_gen: turns an index bus into a read request for a dp_ram ("Generate").
//
// Each clock it registers the index bus: the read enable follows the index
// ready flag and the read address is the index address plus a base offset.
// While the index bus is idle the enable is low and the last address is
// kept. The data for an index issued in clock t thus appears on the RAM
// output in clock t+2. The base offset is this design's addition; it lets a
// stage read an operand placed anywhere in a RAM.
module rd_gen
  import fnn_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  index_value_t idx,
  input  addr_t        base,
  output rd_ctrl_t     rd
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0;
    end else begin
      rd.en <= idx.ready;
      if (idx.ready) rd.addr <= base + idx.addr;
    end
  end

endmodule
