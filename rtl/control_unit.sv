// control_unit: program counter, decoder and control logic of the processor.
//
// The document's control unit runs the program and relieves the SIMD unit of
// address and loop bookkeeping with hardware address generators (agu) and a
// hardware loop counter (loop_ctrl). That lets the whole FIR inner loop be a
// single instruction, VFIR with the djnz flag, issued once per cycle.
//
// Pipeline: fetch and execute overlap. fetch_addr is the next PC and goes
// straight to the synchronous instruction memory, so `instr` always holds the
// word at `pc`, and jumps, branches and loop-backs cost no bubble. In each
// running cycle the instruction at pc is decoded and either retires
// (ctl.exec) or is held for a cycle:
//   bank stall   its data-memory access collides with the SIMD write-back in
//                the same bank (dmem_gnt low);
//   drain stall  it is a scalar load or store, or HALT, while the SIMD
//                pipeline still holds operations, so scalar code and the host
//                see every SIMD result;
//   divide wait  a DIV or REM waits for the iterative divider (div_wait).
// Retiring vector instructions issue into the SIMD read stage with the source
// address from AR(ra) and the destination address from AR(rd), both
// post-incremented. An instruction with the L flag also counts the hardware
// loop down and, while it is not done, continues at the loop start.
// `start` (one cycle, while stopped) begins execution at start_pc; HALT stops
// it and raises `done` until the next start. `cycles` counts running cycles.
// The instruction set is this design's own; the document gives only pseudo
// assembly.
module control_unit
  import imp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // run control
  input  logic          start,
  input  logic [AW-1:0] start_pc,
  output logic          running,
  output logic          done,
  output logic [XW-1:0] cycles,
  // instruction memory
  output logic          fetch_en,
  output logic [AW-1:0] fetch_addr,
  input  logic [31:0]   instr,
  // scalar unit
  output ctl_t          ctl,
  input  logic [XW-1:0] ra_val,
  input  logic [XW-1:0] rb_val,
  input  logic          div_wait,
  // data memory, issue port
  output dmem_req_t     dmem_req,
  input  logic          dmem_gnt,
  // SIMD unit
  output logic          v_issue,
  output vop_t          v_op,
  output logic          v_comp,
  output logic [AW-1:0] v_waddr,
  input  logic          v_busy,
  // events, for observation
  output logic          stall_bank,
  output logic          stall_drain,
  output logic          loop_back
);

  instr_t        ins;
  logic [AW-1:0] pc, pc_next;
  logic [XW-1:0] imm;
  logic          memop, vecop, scal_mem, exec;
  logic [AW-1:0] addr_a, addr_b;
  logic          take;
  logic [AW-1:0] loop_target;

  assign ins = instr_t'(instr);
  assign imm = XW'($signed(ins.imm));

  assign vecop    = ins.op inside {OP_VSH1, OP_VSH2, OP_VFIR};
  assign scal_mem = ins.op inside {OP_LD, OP_ST};
  assign memop    = vecop || scal_mem;

  assign stall_drain = running && (scal_mem || ins.op == OP_HALT) && v_busy;
  assign stall_bank  = running && memop && !stall_drain && !dmem_gnt;
  assign exec        = running && !stall_drain && !stall_bank && !div_wait;

  // address generators: port a = source stream AR(ra), port b = destination AR(rd)
  agu u_agu (
    .clk, .rst_n,
    .sel_a(ins.ra[ARW-1:0]), .sel_b(ins.rd[ARW-1:0]),
    .inc_a(exec && (vecop || (ins.op == OP_LD && ins.imm[0]))),
    .inc_b(exec && (ins.op == OP_VFIR || (ins.op == OP_ST && ins.imm[0]))),
    .addr_a, .addr_b,
    .set_en(exec && ins.op == OP_SETAR), .set_sel(ins.rd[ARW-1:0]),
    .set_val(AW'(ra_val + imm))
  );

  loop_ctrl u_loop (
    .clk, .rst_n,
    .load(exec && ins.op == OP_LOOP), .count(ra_val[CW-1:0]), .start_pc(pc + AW'(1)),
    .djnz(exec && ins.l), .take, .target(loop_target), .remaining()
  );

  always_comb begin
    pc_next   = pc;
    loop_back = 1'b0;
    if (exec) begin
      pc_next = pc + AW'(1);
      unique case (ins.op)
        OP_JMP:  pc_next = ins.imm[AW-1:0];
        OP_BEQZ: if (ra_val == '0) pc_next = ins.imm[AW-1:0];
        OP_BNEZ: if (ra_val != '0) pc_next = ins.imm[AW-1:0];
        default: ;
      endcase
      if (pc_next == pc + AW'(1) && take) begin
        pc_next   = loop_target;
        loop_back = 1'b1;
      end
    end
  end

  assign fetch_en   = running || start;
  assign fetch_addr = (start && !running) ? start_pc : pc_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; done <= 1'b0; pc <= '0; cycles <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1; done <= 1'b0; pc <= start_pc; cycles <= '0;
      end
    end else begin
      pc     <= pc_next;
      cycles <= cycles + 1'b1;
      if (exec && ins.op == OP_HALT) begin
        running <= 1'b0; done <= 1'b1;
      end
    end
  end

  assign ctl = '{valid: running, exec: exec, op: ins.op, rd: ins.rd, ra: ins.ra, rb: rb_of(ins),
                 imm: imm, ar_val: addr_a};

  assign dmem_req = '{en:    running && memop && !stall_drain,
                      we:    ins.op == OP_ST,
                      addr:  ins.op == OP_ST ? addr_b : addr_a,
                      wdata: rb_val};

  assign v_issue = exec && vecop;
  assign v_comp  = ins.imm[0];
  assign v_waddr = addr_b;
  always_comb begin
    unique case (ins.op)
      OP_VSH2: v_op = V_SH2;
      OP_VFIR: v_op = V_FIR;
      default: v_op = V_SH1;
    endcase
  end

endmodule
