// scalar_unit: the scalar datapath for the sequential part of the workload.
//
// The document leaves the sequential, control-heavy work (the sliding-window
// frame detector among it) to a conventional scalar unit with a MAC. This one
// executes a decoded instruction (ctl) in the cycle it retires: it reads ra
// and rb from the register file, computes in scalar_alu and writes rd at the
// clock edge. Loads return from data memory a cycle later (ld_data); their
// result goes in through the second write port, and an instruction that reads
// the loaded register in that very cycle gets ld_data through a bypass
// (bypass_a/bypass_b show when it is used), so a load never stalls. ra_val
// and rb_val go back to the control unit for branches, the loop count,
// address-register loads and store data. DIV and REM use the iterative
// scalar_div: while it works, div_wait asks the control unit to hold the
// instruction, which then retires with the result in the cycle div_wait
// drops (W+2 cycles after it arrived).
module scalar_unit
  import imp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  ctl_t          ctl,
  input  logic [XW-1:0] ld_data,
  output logic [XW-1:0] ra_val,
  output logic [XW-1:0] rb_val,
  output logic [XW-1:0] acc,
  output logic          bypass_a,
  output logic          bypass_b,
  output logic          div_wait
);

  logic [XW-1:0] da, db, y, alu_y, div_q, div_r;
  logic          is_div, div_busy, div_done;
  logic          ld_pend;
  logic [3:0]    ld_rd;
  logic          wr;

  scalar_regs u_regs (
    .clk, .rst_n, .ra(ctl.ra), .rb(ctl.rb), .da, .db,
    .we0(wr), .wa0(ctl.rd), .wd0(y),
    .we1(ld_pend), .wa1(ld_rd), .wd1(ld_data)
  );

  assign bypass_a = ld_pend && ld_rd != '0 && ld_rd == ctl.ra;
  assign bypass_b = ld_pend && ld_rd != '0 && ld_rd == ctl.rb;
  assign ra_val   = bypass_a ? ld_data : da;
  assign rb_val   = bypass_b ? ld_data : db;

  scalar_alu u_alu (
    .clk, .rst_n, .en(ctl.exec), .op(ctl.op), .a(ra_val), .b(rb_val),
    .imm(ctl.imm), .arv(ctl.ar_val), .y(alu_y), .acc
  );

  assign is_div = ctl.op inside {OP_DIV, OP_REM};

  scalar_div u_div (
    .clk, .rst_n, .start(ctl.valid && is_div && !div_busy), .a(ra_val), .b(rb_val),
    .busy(div_busy), .done(div_done), .q(div_q), .r(div_r)
  );

  assign div_wait = ctl.valid && is_div && !div_done;
  assign y = !is_div ? alu_y : (ctl.op == OP_DIV ? div_q : div_r);

  always_comb begin
    unique case (ctl.op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRA, OP_MUL,
      OP_MFACC, OP_ADDI, OP_LUI, OP_MFAR,
      OP_DIV, OP_REM:                      wr = ctl.exec;
      default:                             wr = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_pend <= 1'b0; ld_rd <= '0;
    end else begin
      ld_pend <= ctl.exec && ctl.op == OP_LD;
      if (ctl.exec && ctl.op == OP_LD) ld_rd <= ctl.rd;
    end
  end

endmodule
