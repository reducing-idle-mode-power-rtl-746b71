// tb_agu: self-checking test of the address generators: loads, single and
// dual post-increments (including both ports on one register) and the
// priority of a load over an increment, against a model.
module tb_agu;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [ARW-1:0] sel_a = '0, sel_b = '0, set_sel = '0;
  logic inc_a = 0, inc_b = 0, set_en = 0;
  logic [AW-1:0] addr_a, addr_b, set_val = '0;
  logic [AW-1:0] m [NAR];
  int checks = 0, failures = 0;

  agu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < NAR; i++) m[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      sel_a = ARW'($urandom); sel_b = ARW'($urandom); set_sel = ARW'($urandom);
      inc_a = 1'($urandom); inc_b = 1'($urandom); set_en = ($urandom_range(7) == 0);
      set_val = AW'($urandom);
      #1;
      checks++;
      if (addr_a !== m[sel_a] || addr_b !== m[sel_b]) begin failures++; $display("FAIL read t=%0d", t); end
      for (int i = 0; i < NAR; i++) begin
        int n;
        n = (inc_a && sel_a == i) + (inc_b && sel_b == i);
        if (set_en && set_sel == i) m[i] = set_val;
        else m[i] = m[i] + AW'(n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
