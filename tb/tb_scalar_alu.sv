// tb_scalar_alu: self-checking test of the scalar ALU and its MAC: every
// register-writing operation with random operands, and a run of MAC / MSU /
// MTACC against a model accumulator.
module tb_scalar_alu;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  opcode_t op = OP_NOP;
  logic [XW-1:0] a = '0, b = '0, imm = '0, y, acc;
  logic [AW-1:0] arv = '0;
  logic [XW-1:0] macc;
  int checks = 0, failures = 0;

  scalar_alu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [XW-1:0] ref_y(opcode_t o, logic [XW-1:0] x, logic [XW-1:0] z,
                                          logic [XW-1:0] im, logic [AW-1:0] ar, logic [XW-1:0] ac);
    case (o)
      OP_ADD:   return x + z;
      OP_SUB:   return x - z;
      OP_AND:   return x & z;
      OP_OR:    return x | z;
      OP_XOR:   return x ^ z;
      OP_SLL:   return x << z[4:0];
      OP_SRA:   return XW'($signed(x) >>> z[4:0]);
      OP_MUL:   return XW'(longint'($signed(x)) * longint'($signed(z)));
      OP_MFACC: return ac;
      OP_ADDI:  return x + im;
      OP_LUI:   return im << 15;
      OP_MFAR:  return XW'(ar);
      default:  return '0;
    endcase
  endfunction

  opcode_t ops [] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRA, OP_MUL,
                      OP_MFACC, OP_ADDI, OP_LUI, OP_MFAR, OP_MAC, OP_MSU, OP_MTACC, OP_NOP};

  initial begin
    macc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      op = ops[$urandom_range(ops.size() - 1)];
      a = $urandom; b = $urandom; imm = XW'($signed(17'($urandom))); arv = AW'($urandom);
      if (t % 4 == 0) begin a = XW'($signed(16'($urandom))); b = XW'($signed(16'($urandom))); end
      en = 1'($urandom);
      #1;
      checks++;
      if (y !== ref_y(op, a, b, imm, arv, macc)) begin failures++; $display("FAIL %s y=%h", op.name(), y); end
      if (en) case (op)
        OP_MAC:   macc = macc + XW'(longint'($signed(a)) * longint'($signed(b)));
        OP_MSU:   macc = macc - XW'(longint'($signed(a)) * longint'($signed(b)));
        OP_MTACC: macc = a;
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (acc !== macc) begin failures++; $display("FAIL acc after %s", op.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
