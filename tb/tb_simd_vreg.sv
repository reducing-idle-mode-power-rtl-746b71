// tb_simd_vreg: self-checking test of the vector registers VR1 and VR2:
// shift order, vr1_next look-ahead, independent shifting and reset.
module tb_simd_vreg;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0, sh1 = 0, sh2 = 0;
  logic [DW-1:0] din = '0;
  logic [LANES-1:0][DW-1:0] vr1, vr1_next, vr2;
  logic [LANES-1:0][DW-1:0] m1, m2;
  int checks = 0, failures = 0;

  simd_vreg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m1 = '0; m2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (vr1 !== '0 || vr2 !== '0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      sh1 = 1'($urandom); sh2 = 1'($urandom); din = DW'($urandom);
      #1;
      checks++;
      if (vr1_next !== (sh1 ? {din, m1[LANES-1:1]} : m1)) begin failures++; $display("FAIL vr1_next t=%0d", t); end
      if (sh1) m1 = {din, m1[LANES-1:1]};
      if (sh2) m2 = {din, m2[LANES-1:1]};
      @(posedge clk); #1;
      checks++;
      if (vr1 !== m1 || vr2 !== m2) begin failures++; $display("FAIL regs t=%0d", t); end
    end
    // lane order: after LANES shifts of 0..LANES-1, lane i holds i
    for (int i = 0; i < LANES; i++) begin
      @(negedge clk); sh1 = 1; sh2 = 0; din = DW'(i);
    end
    @(negedge clk); sh1 = 0;
    for (int i = 0; i < LANES; i++) begin
      checks++; if (vr1[i] !== DW'(i)) begin failures++; $display("FAIL lane %0d holds %0d", i, vr1[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
