// tb_scalar_regs: self-checking test of the scalar register file: random
// traffic on both write ports and both read ports against a model, with the
// port-0 priority and the hard-wired zero register.
module tb_scalar_regs;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0, we0 = 0, we1 = 0;
  logic [3:0] ra = '0, rb = '0, wa0 = '0, wa1 = '0;
  logic [XW-1:0] da, db, wd0 = '0, wd1 = '0;
  logic [XW-1:0] m [NREG];
  int checks = 0, failures = 0;

  scalar_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < NREG; i++) m[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ra = 4'($urandom); rb = 4'($urandom);
      we0 = 1'($urandom); wa0 = 4'($urandom); wd0 = $urandom;
      we1 = 1'($urandom); wa1 = (t % 5 == 0) ? wa0 : 4'($urandom); wd1 = $urandom;
      #1;
      checks++;
      if (da !== m[ra] || db !== m[rb]) begin failures++; $display("FAIL read t=%0d", t); end
      if (we1 && wa1 != 0) m[wa1] = wd1;
      if (we0 && wa0 != 0) m[wa0] = wd0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
