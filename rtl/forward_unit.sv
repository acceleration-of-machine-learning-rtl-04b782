// forward_unit: bypass for the accumulator of the matrix multiplier
// ("Forward").
//
// The multiplier adds each new product to the partial sum of the same output
// element. When the output address of the incoming product (old_idx, the
// element read from the C matrix) equals the address of the partial sum that
// was just computed (new_idx), that partial sum has not yet reached the RAM,
// so it is forwarded. Otherwise the value read from the C matrix is used when
// old_idx is ready, and zero when it is not (the start of a sum with no
// prior contents). Purely combinational.
module forward_unit
  import fnn_pkg::*;
(
  input  index_value_t new_idx,   // address of the newest partial sum
  input  fix_t         new_val,   // the newest partial sum
  input  index_value_t old_idx,   // address of the element read from C
  input  fix_t         old_val,   // the element read from C
  output fix_t         fwd_val,
  output logic         fwd_hit    // the partial sum was forwarded
);

  always_comb begin
    fwd_hit = new_idx.ready && (new_idx.addr == old_idx.addr);
    if (fwd_hit)            fwd_val = new_val;
    else if (old_idx.ready) fwd_val = old_val;
    else                    fwd_val = '0;
  end

endmodule
