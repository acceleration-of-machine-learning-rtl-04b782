// sla_unit: sum over the last axis (the SumLastAxis process).
//
// Accumulates a run of elements: an element flagged first starts a new sum,
// every other valid element is added to it. When the element flagged save
// (the last of its row) has been added, y_valid is set for one clock with the
// finished sum on y. One register stage: the sum including an element
// presented in clock t is on y in clock t+1.
module sla_unit
  import fnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic first,
  input  logic save,
  input  fix_t x,
  output fix_t y,
  output logic y_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= valid && save;
      if (valid) y <= first ? x : fx_add(y, x);
    end
  end

endmodule
