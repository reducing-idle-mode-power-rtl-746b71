// scalar_alu: arithmetic unit of the scalar unit, with its MAC.
//
// Computes y for the register-writing scalar operations (add, subtract,
// and/or/xor, shifts, multiply, add-immediate, load-upper-immediate, and the
// moves from the accumulator and from an address register) in one
// combinational step. The document recommends a multiply-accumulate unit for
// the scalar workload, such as the running correlation of the sliding-window
// detector; MAC and MSU add or subtract a*b to the accumulator `acc` at the
// clock edge when `en` is high, and MTACC loads it. Division, which the
// document also lists for the scalar workload, is not provided: it is done in
// software. Operands are signed 32-bit; the multiply keeps the low 32 bits.
module scalar_alu
  import imp_pkg::*;
#(
  parameter int unsigned W = XW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  opcode_t       op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [W-1:0]  imm,
  input  logic [AW-1:0] arv,
  output logic [W-1:0]  y,
  output logic [W-1:0]  acc
);

  logic signed [W-1:0] sa, sb, prod;
  assign sa   = a;
  assign sb   = b;
  assign prod = sa * sb;

  always_comb begin
    unique case (op)
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_SLL:   y = a << b[4:0];
      OP_SRA:   y = sa >>> b[4:0];
      OP_MUL:   y = prod;
      OP_MFACC: y = acc;
      OP_ADDI:  y = a + imm;
      OP_LUI:   y = imm << 15;
      OP_MFAR:  y = W'(arv);
      default:  y = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      case (op)
        OP_MAC:   acc <= acc + prod;
        OP_MSU:   acc <= acc - prod;
        OP_MTACC: acc <= a;
        default:  ;
      endcase
    end
  end

endmodule
