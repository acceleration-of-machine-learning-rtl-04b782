// ctrl_join: waits for the ready pulses of two control buses and then emits
// one ready pulse carrying the shape of the first bus.
//
// It starts a stage that needs two results produced by stages of different
// length, such as the product r * z at the end of the network. Each ready
// pulse is remembered until the other has arrived too; the joined pulse comes
// one clock after the later of the two. waited is set together with the
// joined pulse when one of the two had to be held.
module ctrl_join
  import fnn_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  index_control_t ctrl_a,
  input  index_control_t ctrl_b,
  output index_control_t ctrl_out,
  output logic           waited
);

  logic           seen_a, seen_b;
  index_control_t held_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {seen_a, seen_b, waited} <= '0;
      held_a   <= '0;
      ctrl_out <= '0;
    end else begin
      ctrl_out.ready <= 1'b0;
      waited <= 1'b0;
      if (ctrl_a.ready) held_a <= ctrl_a;
      if ((seen_a || ctrl_a.ready) && (seen_b || ctrl_b.ready)) begin
        ctrl_out <= ctrl_a.ready ? ctrl_a : held_a;
        ctrl_out.ready <= 1'b1;
        seen_a <= 1'b0;
        seen_b <= 1'b0;
        waited <= !(ctrl_a.ready && ctrl_b.ready);
      end else begin
        if (ctrl_a.ready) seen_a <= 1'b1;
        if (ctrl_b.ready) seen_b <= 1'b1;
      end
    end
  end

endmodule
