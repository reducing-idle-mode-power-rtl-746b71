// tb_simd_vmult: self-checking test of the lane multiplier / complementer.
// Random and corner-case lanes, in multiply mode and in +/-1 complement mode.
module tb_simd_vmult;
  import imp_pkg::*;
  logic [LANES-1:0][DW-1:0]   x, c;
  logic                       comp;
  logic [LANES-1:0][2*DW-1:0] p;
  int checks = 0, failures = 0;

  simd_vmult dut (.*);

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      comp = t[0];
      for (int i = 0; i < LANES; i++) begin
        x[i] = DW'($urandom);
        c[i] = comp ? ($urandom_range(1) ? 16'hFFFF : 16'h0001) : DW'($urandom);
      end
      if (t == 2) begin x[0] = 16'h8000; c[0] = 16'h8000; x[1] = 16'h7FFF; c[1] = 16'h8000; end
      if (t == 3) begin x[0] = 16'h8000; c[0] = 16'hFFFF; end
      #1;
      for (int i = 0; i < LANES; i++) begin
        longint xs, cs, e;
        xs = longint'($signed(x[i])); cs = longint'($signed(c[i]));
        e = comp ? (cs < 0 ? -xs : xs) : xs * cs;
        checks++;
        if (p[i] !== 32'(e)) begin
          failures++; $display("FAIL t=%0d lane %0d: x=%h c=%h comp=%0d got %h exp %h", t, i, x[i], c[i], comp, p[i], 32'(e));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
