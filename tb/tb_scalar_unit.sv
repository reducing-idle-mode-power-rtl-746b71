// tb_scalar_unit: self-checking test of the scalar datapath. Decoded
// instructions are driven directly: random ALU operations and loads, where the
// load data arrive one cycle late, are checked against a register model through
// the ra_val / rb_val read ports, and the load bypass must be used whenever an
// instruction reads a register loaded in the cycle before.
module tb_scalar_unit;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0;
  ctl_t ctl;
  logic [XW-1:0] ld_data = '0, ra_val, rb_val, acc;
  logic bypass_a, bypass_b, div_wait;
  logic [XW-1:0] m [NREG];
  int checks = 0, failures = 0, n_bypass = 0;

  scalar_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  opcode_t ops [] = '{OP_ADD, OP_SUB, OP_XOR, OP_MUL, OP_ADDI, OP_LD, OP_LD, OP_NOP};

  initial begin
    logic       pend;
    logic [3:0] pend_rd;
    logic [XW-1:0] pend_val, a, b, r;
    for (int i = 0; i < NREG; i++) m[i] = '0;
    ctl = '0; pend = 0; pend_rd = '0; pend_val = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ctl.valid = 1;
      ctl.exec = 1'($urandom_range(7) != 0);
      ctl.op = ops[$urandom_range(ops.size() - 1)];
      ctl.rd = 4'($urandom);
      ctl.ra = (pend && t % 2 == 0) ? pend_rd : 4'($urandom);
      ctl.rb = (pend && t % 3 == 0) ? pend_rd : 4'($urandom);
      ctl.imm = XW'($signed(17'($urandom)));
      ctl.ar_val = '0;
      ld_data = pend ? pend_val : XW'($urandom);
      // the load of the previous cycle lands now (write port 1)
      if (pend && pend_rd != 0) m[pend_rd] = pend_val;
      #1;
      a = m[ctl.ra]; b = m[ctl.rb];
      checks++;
      if (ra_val !== a || rb_val !== b) begin
        failures++; $display("FAIL operands t=%0d ra=%0d %h/%h rb=%0d %h/%h", t, ctl.ra, ra_val, a, ctl.rb, rb_val, b);
      end
      if (pend && pend_rd != 0 && (ctl.ra == pend_rd || ctl.rb == pend_rd)) begin
        n_bypass++;
        checks++;
        if (!(bypass_a || bypass_b)) begin failures++; $display("FAIL bypass not used"); end
      end
      case (ctl.op)
        OP_ADD:  r = a + b;
        OP_SUB:  r = a - b;
        OP_XOR:  r = a ^ b;
        OP_MUL:  r = XW'(longint'($signed(a)) * longint'($signed(b)));
        OP_ADDI: r = a + ctl.imm;
        default: r = '0;
      endcase
      pend = ctl.exec && ctl.op == OP_LD;
      pend_rd = ctl.rd; pend_val = $urandom;
      if (ctl.exec && ctl.op inside {OP_ADD, OP_SUB, OP_XOR, OP_MUL, OP_ADDI} && ctl.rd != 0) begin
        m[ctl.rd] = r;
        if (pend_rd == ctl.rd) pend = pend; // no clash: an op is either a load or not
      end
    end
    // DIV / REM: the instruction is held while div_wait is high, then retires
    for (int t = 0; t < 20; t++) begin
      logic signed [XW-1:0] sa, sb, e;
      int held;
      bit is_rem;
      is_rem = t[0];
      @(negedge clk);
      ctl = '0; ctl.valid = 1; ctl.op = OP_ADDI; ctl.exec = 1; ctl.rd = 4'd1; ctl.ra = 4'd0;
      ctl.imm = XW'($signed(17'($urandom)));
      sa = ctl.imm;
      @(negedge clk);
      ctl.rd = 4'd2; ctl.imm = XW'($signed(9'($urandom))); sb = ctl.imm;
      @(negedge clk);
      ctl.op = is_rem ? OP_REM : OP_DIV; ctl.rd = 4'd3; ctl.ra = 4'd1; ctl.rb = 4'd2;
      held = 0;
      #1;
      while (div_wait) begin ctl.exec = 0; @(negedge clk); held++; #1; end
      ctl.exec = 1;
      @(negedge clk);
      ctl = '0; ctl.valid = 1; ctl.ra = 4'd3;
      #1;
      e = (sb == 0) ? (is_rem ? sa : -1) : (is_rem ? sa % sb : sa / sb);
      checks++;
      if (ra_val !== e) begin failures++; $display("FAIL %0d %s %0d = %0d exp %0d", sa, is_rem ? "%" : "/", sb, $signed(ra_val), e); end
      checks++;
      if (held != XW + 1) begin failures++; $display("FAIL divide held %0d cycles", held); end
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("FAIL bypass never exercised"); end
    $display("bypasses=%0d", n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
