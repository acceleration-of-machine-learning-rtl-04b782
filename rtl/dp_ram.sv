// dp_ram: simple dual-port memory holding one flat tensor.
//
// One write port and one read port, both synchronous to clk. A write request
// (wr.en) stores wr.data at wr.addr at the clock edge. A read request (rd.en)
// returns mem[rd.addr] on rdata one clock later; rdata holds its value while
// no read is requested. A read of the address being written in the same
// clock returns the old contents (read-first), which is what block RAM in
// read-first mode does. The memory has no reset: the pipeline never reads an
// element it has not written first.
module dp_ram
  import fnn_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic     clk,
  input  wr_ctrl_t wr,
  input  rd_ctrl_t rd,
  output fix_t     rdata
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr.en) mem[AW'(wr.addr)] <= wr.data;
    if (rd.en) rdata <= mem[AW'(rd.addr)];
  end

  // Out-of-range accesses indicate an address generator fault.
  always_ff @(posedge clk) begin
    if (wr.en) assert (wr.addr < addr_t'(DEPTH)) else $error("dp_ram: write address %0d >= %0d", wr.addr, DEPTH);
    if (rd.en) assert (rd.addr < addr_t'(DEPTH)) else $error("dp_ram: read address %0d >= %0d", rd.addr, DEPTH);
  end

endmodule
