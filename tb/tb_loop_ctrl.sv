// tb_loop_ctrl: self-checking test of the hardware loop counter. For counts
// 1..20 it runs djnz until the loop falls through and checks that the body
// ran exactly `count` times and that the jump target is the loaded start.
module tb_loop_ctrl;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, djnz = 0, take;
  logic [CW-1:0] count = '0, remaining;
  logic [AW-1:0] start_pc = '0, target;
  int checks = 0, failures = 0;

  loop_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= 20; n++) begin
      int runs;
      @(negedge clk); load = 1; count = CW'(n); start_pc = AW'(100 + n);
      @(negedge clk); load = 0;
      runs = 0;
      // a few idle cycles must not change anything
      repeat (n % 3) @(negedge clk);
      forever begin
        djnz = 1; runs++;
        #1;
        if (take) begin
          checks++;
          if (target !== AW'(100 + n)) begin failures++; $display("FAIL target"); end
          @(negedge clk);
        end else break;
      end
      @(negedge clk); djnz = 0;
      checks++;
      if (runs != n) begin failures++; $display("FAIL count %0d ran %0d", n, runs); end
      checks++;
      if (remaining != CW'(0)) begin failures++; $display("FAIL remaining %0d", remaining); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
