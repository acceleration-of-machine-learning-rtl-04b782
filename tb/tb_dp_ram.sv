// tb_dp_ram: writes random words to random addresses of a dp_ram, reads
// them back, and checks the one-clock read latency, the held output while no
// read is requested, and read-first behaviour when a read and a write hit
// the same address in the same clock.
`timescale 1ns/1ps
module tb_dp_ram;
  import fnn_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  wr_ctrl_t wr = '0;
  rd_ctrl_t rd = '0;
  fix_t rdata;
  dp_ram #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  fix_t model [DEPTH];
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(fix_t got, fix_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); model[a] = fix_t'($urandom); wr = '{en: 1, addr: addr_t'(a), data: model[a]};
    end
    @(negedge clk); wr = '0;
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom % DEPTH;
      @(negedge clk); rd = '{en: 1, addr: addr_t'(a)};
      @(negedge clk); rd = '0;
      chk(rdata, model[a], $sformatf("read %0d", a));
      @(negedge clk);
      chk(rdata, model[a], "held");
    end
    // read-first: same-clock read and write of one address
    @(negedge clk);
    rd = '{en: 1, addr: 5};
    wr = '{en: 1, addr: 5, data: 32'h1234_5678};
    @(negedge clk);
    rd = '0; wr = '0;
    chk(rdata, model[5], "read-first old value");
    @(negedge clk); rd = '{en: 1, addr: 5};
    @(negedge clk); rd = '0;
    chk(rdata, 32'h1234_5678, "new value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
