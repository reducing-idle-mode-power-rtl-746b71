// tb_mem_bank: self-checking test of the single-port memory sub-bank.
// Writes a pattern, reads it back in a shuffled order, and checks the one-cycle
// read latency and that rdata holds while the bank is idle or written.
module tb_mem_bank;
  localparam int WORDS = 64;
  logic clk = 0, en = 0, we = 0;
  logic [5:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  mem_bank #(.WORDS(WORDS), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      @(negedge clk); en = 1; we = 1; addr = 6'(i); wdata = model[i];
    end
    @(negedge clk); en = 0; we = 0;
    for (int k = 0; k < WORDS; k++) begin
      int a;
      a = (k * 37 + 11) % WORDS;
      @(negedge clk); en = 1; we = 0; addr = 6'(a);
      @(negedge clk); en = 0;
      chk(rdata, model[a], "read after 1 cycle");
      // idle bank and a write elsewhere must not disturb rdata
      @(negedge clk); en = 1; we = 1; addr = 6'((a + 1) % WORDS); wdata = ~model[(a+1)%WORDS];
      model[(a+1)%WORDS] = ~model[(a+1)%WORDS];
      @(negedge clk); en = 0; we = 0;
      chk(rdata, model[a], "rdata held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
