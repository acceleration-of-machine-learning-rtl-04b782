// tb_rd_gen: drives random index buses into rd_gen and checks that the read
// request of the next clock has the enable of the index ready flag and the
// address base + index address, and that the address is held when idle.
`timescale 1ns/1ps
module tb_rd_gen;
  import fnn_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  index_value_t idx = '0;
  addr_t base = '0;
  rd_ctrl_t rd;
  rd_gen dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    addr_t last_addr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    last_addr = '0;
    for (int n = 0; n < 200; n++) begin
      idx = '{ready: 1'($urandom), addr: addr_t'($urandom % 5000)};
      base = addr_t'($urandom % 100);
      @(negedge clk);
      checks++;
      if (idx.ready) last_addr = base + idx.addr;
      if (rd.en !== idx.ready || rd.addr !== last_addr) begin
        failures++;
        $display("FAIL n=%0d en=%b addr=%0d exp %b %0d", n, rd.en, rd.addr, idx.ready, last_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
