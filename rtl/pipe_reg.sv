// pipe_reg: a chain of DEPTH registers for any bus type.
//
// Each clock, every register passes its value one step on, so q is d delayed
// by DEPTH clocks. It serves for every "pipe" of the pipeline: the address
// pipes that keep a write address next to the data it belongs to, the control
// pipes between stages and the flag pipes that mark the last element of a
// run. Reset clears every register, so that no ready flag is seen before the
// first real one. DEPTH = 0 is a plain wire.
module pipe_reg #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  T     d,
  output T     q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    T stage [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end

endmodule
