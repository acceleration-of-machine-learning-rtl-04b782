// tb_to_ram: drives random index and value buses into to_ram and checks
// that the write request of the next clock carries the ready flag, address
// and value, and that a following dp_ram holds the written values.
`timescale 1ns/1ps
module tb_to_ram;
  import fnn_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  index_value_t idx = '0;
  fix_t value = '0;
  wr_ctrl_t wr;
  to_ram dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    fix_t ld;
    addr_t la;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ld = '0; la = '0;
    for (int n = 0; n < 200; n++) begin
      idx = '{ready: 1'($urandom), addr: addr_t'($urandom % 64)};
      value = fix_t'($urandom);
      @(negedge clk);
      if (idx.ready) begin la = idx.addr; ld = value; end
      checks++;
      if (wr.en !== idx.ready || (idx.ready && (wr.addr !== la || wr.data !== ld))) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
