// imp_pkg: types and constants shared by the idle mode processor.
//
// The processor pairs a 32-lane SIMD FIR datapath with a small scalar unit.
// The SIMD width (32) and the 16-bit sample precision follow the document;
// the memory word width, the bank size, the instruction set and its 32-bit
// encoding are this design's own choices.
//
// Instruction encoding (32 bits):
//   [31:26] opcode   [25] L (djnz: decrement loop counter, jump to loop start if not zero)
//   [24:21] rd       [20:17] ra       [16:13] rb
//   [16:0]  imm17    (signed immediate / absolute target, shares bits with rb)
// Address registers are named by the low three bits of rd (destination
// stream) and ra (source stream).
package imp_pkg;

  localparam int unsigned LANES      = 32;     // SIMD width
  localparam int unsigned DW         = 16;     // sample / coefficient width
  localparam int unsigned XW         = 32;     // scalar and data-memory word width
  localparam int unsigned AW         = 15;     // word address width (25600 words)
  localparam int unsigned BANK_WORDS = 1024;   // words per memory sub-bank
  localparam int unsigned NBANKS     = 25;     // 25 x 1024 x 4 bytes = 100 Kbytes
  localparam int unsigned MEM_WORDS  = NBANKS * BANK_WORDS;
  localparam int unsigned NREG       = 16;     // scalar registers
  localparam int unsigned NAR        = 8;      // address registers
  localparam int unsigned CW         = 16;     // loop counter width
  localparam int unsigned ARW        = $clog2(NAR);

  typedef enum logic [5:0] {
    OP_NOP    = 6'h00,
    OP_HALT   = 6'h01,
    OP_ADD    = 6'h02,  // rd = ra + rb
    OP_SUB    = 6'h03,  // rd = ra - rb
    OP_AND    = 6'h04,
    OP_OR     = 6'h05,
    OP_XOR    = 6'h06,
    OP_SLL    = 6'h07,  // rd = ra << rb[4:0]
    OP_SRA    = 6'h08,  // rd = ra >>> rb[4:0]
    OP_MUL    = 6'h09,  // rd = low 32 bits of ra * rb
    OP_MAC    = 6'h0A,  // acc = acc + ra * rb
    OP_MSU    = 6'h0B,  // acc = acc - ra * rb
    OP_MFACC  = 6'h0C,  // rd = acc
    OP_MTACC  = 6'h0D,  // acc = ra
    OP_ADDI   = 6'h0E,  // rd = ra + imm
    OP_LUI    = 6'h0F,  // rd = imm << 15
    OP_LD     = 6'h10,  // rd = mem[AR(ra)]; AR(ra)++ if imm[0]
    OP_ST     = 6'h11,  // mem[AR(rd)] = rb; AR(rd)++ if imm[0]
    OP_SETAR  = 6'h12,  // AR(rd) = ra + imm
    OP_MFAR   = 6'h13,  // rd = AR(ra)
    OP_BEQZ   = 6'h14,  // if ra == 0 goto imm
    OP_BNEZ   = 6'h15,  // if ra != 0 goto imm
    OP_JMP    = 6'h16,  // goto imm
    OP_LOOP   = 6'h17,  // loop counter = ra, loop start = pc + 1
    OP_VSH1   = 6'h18,  // VR1 <- shift VR1, mem[AR(ra)++]
    OP_VSH2   = 6'h19,  // VR2 <- shift VR2, mem[AR(ra)++]
    OP_VFIR   = 6'h1A,  // mem[AR(rd)++] <- reduce(VR2 * shift(VR1, mem[AR(ra)++])); imm[0]: complement mode
    OP_DIV    = 6'h1B,  // rd = ra / rb (signed, iterative)
    OP_REM    = 6'h1C   // rd = ra % rb (signed, iterative)
  } opcode_t;

  // One request to the data memory.
  typedef struct packed {
    logic          en;
    logic          we;
    logic [AW-1:0] addr;
    logic [XW-1:0] wdata;
  } dmem_req_t;

  // Vector operation in the SIMD pipeline.
  typedef enum logic [1:0] {
    V_SH1 = 2'd0,
    V_SH2 = 2'd1,
    V_FIR = 2'd2
  } vop_t;

  // Fields of an instruction word.
  typedef struct packed {
    opcode_t     op;
    logic        l;
    logic [3:0]  rd;
    logic [3:0]  ra;
    logic [16:0] imm;   // imm[16:13] doubles as rb
  } instr_t;

  // Decoded instruction handed from the control unit to the scalar unit.
  typedef struct packed {
    logic          valid;   // an instruction is in the execute stage
    logic          exec;    // it retires this cycle
    opcode_t       op;
    logic [3:0]    rd;
    logic [3:0]    ra;
    logic [3:0]    rb;
    logic [XW-1:0] imm;     // sign-extended imm17
    logic [AW-1:0] ar_val;  // address register named by ra (for MFAR)
  } ctl_t;

  function automatic logic [3:0] rb_of(instr_t i);
    return i.imm[16:13];
  endfunction

endpackage
