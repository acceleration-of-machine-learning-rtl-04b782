// reduce_stage: a reduction over the last axis: a reduce_index address
// generator, a Generate stage, a sum (sla_unit, the SumLastAxis stage) or
// mean (mean_unit, the Mean stage) unit, and a ToRam stage.
//
// A ready pulse on ctrl_in starts a walk over a height x width tensor; one
// element per clock is read and added to the sum of its row. When a row is
// complete its sum (MEAN = 0) or mean (MEAN = 1) is written to address
// row of the output RAM. The result of a row whose last element is issued in
// clock t is written at the end of clock t+4 (sum) or t+5 (mean). ctrl_out
// pulses ready one clock after the last write, with shape height x 1.
module reduce_stage
  import fnn_pkg::*;
#(
  parameter bit MEAN = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  index_control_t ctrl_in,
  output rd_ctrl_t       rd_a,
  input  fix_t           rdata_a,
  output wr_ctrl_t       wr,
  output index_control_t ctrl_out
);

  localparam int L = MEAN ? 2 : 1;

  index_value_t idx_a, idx_o;
  logic first, save, last, busy;

  reduce_index u_index (
    .clk, .rst_n, .ctrl(ctrl_in), .idx_a, .idx_o, .first, .save, .last, .busy
  );

  rd_gen u_gen_a (.clk, .rst_n, .idx(idx_a), .base('0), .rd(rd_a));

  // flags and output address beside the RAM data (2 clocks)
  typedef struct packed {
    logic  valid;
    logic  first;
    logic  save;
    addr_t addr;
  } flags_t;
  flags_t fl, fl_d;
  assign fl = '{valid: idx_o.ready, first: first, save: save, addr: idx_o.addr};
  pipe_reg #(.T(flags_t), .DEPTH(2)) u_pipe_flag (.clk, .rst_n, .d(fl), .q(fl_d));

  fix_t y;
  logic y_valid;
  if (MEAN) begin : g_unit
    mean_unit u_unit (.clk, .rst_n, .valid(fl_d.valid), .first(fl_d.first), .save(fl_d.save),
                      .x(rdata_a), .y, .y_valid);
  end else begin : g_unit
    sla_unit  u_unit (.clk, .rst_n, .valid(fl_d.valid), .first(fl_d.first), .save(fl_d.save),
                      .x(rdata_a), .y, .y_valid);
  end

  // output address beside the unit's result (ShouldSave gates the write)
  addr_t addr_d;
  pipe_reg #(.T(addr_t), .DEPTH(L)) u_pipe_addr (.clk, .rst_n, .d(fl_d.addr), .q(addr_d));

  to_ram u_toram (.clk, .rst_n, .idx('{ready: y_valid, addr: addr_d}), .value(y), .wr);

  logic last_d;
  pipe_reg #(.T(logic), .DEPTH(3+L)) u_pipe_last (.clk, .rst_n, .d(last), .q(last_d));

  dim_t h_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_out <= '0;
      h_q <= '0;
    end else begin
      if (ctrl_in.ready && !busy) h_q <= ctrl_in.height;
      ctrl_out <= '{ready: last_d, height: h_q, width: dim_t'(1), offset_a: '0, offset_b: '0};
    end
  end

endmodule
