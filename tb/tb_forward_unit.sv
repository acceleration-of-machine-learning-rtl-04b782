// tb_forward_unit: checks the three cases of the forwarding rule with
// random operands: matching ready address forwards the new partial sum,
// otherwise a ready C element passes through, otherwise zero.
`timescale 1ns/1ps
module tb_forward_unit;
  import fnn_pkg::*;
  index_value_t new_idx, old_idx;
  fix_t new_val, old_val, fwd_val;
  logic fwd_hit;
  forward_unit dut (.*);
  int checks = 0, failures = 0;
  int cases [3] = '{0, 0, 0};
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 500; n++) begin
      fix_t exp;
      logic eh;
      new_idx = '{ready: 1'($urandom), addr: addr_t'($urandom % 4)};
      old_idx = '{ready: 1'($urandom), addr: addr_t'($urandom % 4)};
      new_val = fix_t'($urandom);
      old_val = fix_t'($urandom);
      #1;
      eh = new_idx.ready && new_idx.addr == old_idx.addr;
      exp = eh ? new_val : (old_idx.ready ? old_val : '0);
      cases[eh ? 0 : (old_idx.ready ? 1 : 2)]++;
      checks++;
      if (fwd_val !== exp || fwd_hit !== eh) begin failures++; $display("FAIL n=%0d", n); end
    end
    checks++;
    if (cases[0] == 0 || cases[1] == 0 || cases[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
