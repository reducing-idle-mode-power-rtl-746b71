// tb_scalar_div: self-checking test of the iterative signed divider: random
// and corner-case operands (zero divisor, most negative dividend, signs), the
// quotient and remainder against the language's own signed division, and the
// latency of W+1 cycles from start to done.
module tb_scalar_div;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [XW-1:0] a = '0, b = '0, q, r;
  logic busy, done;
  int checks = 0, failures = 0;

  scalar_div dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      logic signed [XW-1:0] sa, sb, eq, er;
      int lat;
      case (t)
        0: begin a = 32'd7;           b = 32'd0;        end
        1: begin a = 32'h8000_0000;   b = 32'hFFFF_FFFF; end
        2: begin a = 32'h8000_0000;   b = 32'd3;         end
        3: begin a = -32'sd7;         b = 32'd2;         end
        4: begin a = 32'd7;           b = -32'sd2;       end
        default: begin
          a = $urandom; b = (t % 3 == 0) ? 32'($signed(8'($urandom))) : $urandom;
          if (t % 7 == 0) a = 32'($signed(16'($urandom)));
        end
      endcase
      sa = a; sb = b;
      if (sb == 0)                                   begin eq = -1; er = sa; end
      else if (sa == 32'sh8000_0000 && sb == -32'sd1) begin eq = sa; er = 0; end
      else                                           begin eq = sa / sb; er = sa % sb; end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (q !== eq || r !== er) begin
        failures++; $display("FAIL %0d / %0d: q=%0d r=%0d exp %0d %0d", sa, sb, $signed(q), $signed(r), eq, er);
      end
      checks++;
      if (lat != XW + 1) begin failures++; $display("FAIL latency %0d", lat); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
