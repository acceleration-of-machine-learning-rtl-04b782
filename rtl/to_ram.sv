// to_ram: turns an index bus and a value into a write request for a dp_ram
// ("ToRam").
//
// Each clock it registers the pair: the write enable follows the index ready
// flag, the address is the index address and the data is the value. The RAM
// stores the element at the following clock edge, so a value presented in
// clock t is in memory from clock t+2 on.
module to_ram
  import fnn_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  index_value_t idx,
  input  fix_t         value,
  output wr_ctrl_t     wr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr <= '0;
    end else begin
      wr.en <= idx.ready;
      if (idx.ready) begin
        wr.addr <= idx.addr;
        wr.data <= value;
      end
    end
  end

endmodule
