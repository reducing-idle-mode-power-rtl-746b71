// tb_simd_vreduce: self-checking test of the reduction adder tree, including
// positive and negative saturation to the 32-bit output word.
module tb_simd_vreduce;
  import imp_pkg::*;
  logic [LANES-1:0][2*DW-1:0] p;
  logic [XW-1:0]              y;
  int checks = 0, failures = 0;

  simd_vreduce dut (.*);

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint s, e;
      s = 0;
      for (int i = 0; i < LANES; i++) begin
        if (t < 100)      p[i] = 32'($signed(16'($urandom)));        // small values
        else if (t < 200) p[i] = $urandom;                            // full range
        else if (t < 250) p[i] = 32'h4000_0000 + 32'($urandom_range(1000)); // overflow up
        else              p[i] = 32'hC000_0000 - 32'($urandom_range(1000)); // overflow down
        s += longint'($signed(p[i]));
      end
      e = s > 64'sd2147483647 ? 64'sd2147483647 : (s < -64'sd2147483648 ? -64'sd2147483648 : s);
      #1;
      checks++;
      if (y !== 32'(e)) begin failures++; $display("FAIL t=%0d got %h exp %h", t, y, 32'(e)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
