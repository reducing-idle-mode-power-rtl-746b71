// tb_inst_mem: self-checking test of the banked instruction memory.
// Loads words into several banks through the write port, then fetches them
// back in random order, one per cycle, checking the one-cycle fetch latency.
module tb_inst_mem;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0, fetch_en = 0, wr_en = 0;
  logic [AW-1:0] fetch_addr = '0, wr_addr = '0;
  logic [31:0] instr, wr_data = '0;
  logic [31:0] model [int];
  int addrs [$];
  int checks = 0, failures = 0;

  inst_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBANKS; b += 3)
      for (int i = 0; i < 8; i++) begin
        int a;
        a = b * BANK_WORDS + (i * 131) % BANK_WORDS;
        @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = $urandom;
        model[a] = wr_data; addrs.push_back(a);
      end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 500; t++) begin
      int a;
      a = addrs[$urandom_range(addrs.size() - 1)];
      @(negedge clk); fetch_en = 1; fetch_addr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (instr !== model[a]) begin failures++; $display("FAIL fetch %0d got %h exp %h", a, instr, model[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
