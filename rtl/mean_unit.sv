// mean_unit: average over the last axis (the Mean process).
//
// Three parts, like Mean_count, Mean_add and Mean_div of the reference
// design: a counter of the elements of the current row, an accumulator of
// their sum (both restarted by an element flagged first), and a divider that
// divides the finished sum by the count when the element flagged save has
// been added. The divider is a combinational signed division truncating
// toward zero, registered once. Two register stages: y_valid and the mean
// appear in clock t+2 for the save element presented in clock t.
module mean_unit
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

  fix_t  sum;
  fix_t  count;
  logic  done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum     <= '0;
      count   <= '0;
      done    <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      // Mean_count and Mean_add
      done <= valid && save;
      if (valid) begin
        sum   <= first ? x : fx_add(sum, x);
        count <= first ? fix_t'(1) : count + 1;
      end
      // Mean_div
      y_valid <= done;
      if (done) y <= sum / count;
    end
  end

endmodule
