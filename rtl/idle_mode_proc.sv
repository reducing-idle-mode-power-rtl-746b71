// idle_mode_proc: the idle mode processor of a software defined radio terminal.
//
// Top level with the document's five units (its Figure 4): SIMD unit, scalar
// unit, control unit, memory unit (data and instruction memory) and system
// bus interface unit. The SIMD unit reads and writes the data memory and is
// driven by the control unit; the scalar unit loads and stores through the
// control unit's data-memory port; the bus interface unit reaches the
// control unit (run control) and both memories. A host loads a program and
// data over APB, writes START_PC and CTRL, and waits for `irq` (the program
// executed HALT) or polls STATUS.
module idle_mode_proc
  import imp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [19:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic        irq
);

  // run control
  logic          start, running, done;
  logic [AW-1:0] start_pc;
  logic [XW-1:0] cycles;
  // instruction memory
  logic          fetch_en, imem_we;
  logic [AW-1:0] fetch_addr, imem_addr;
  logic [31:0]   instr, imem_wdata;
  // data memory
  dmem_req_t     core_req, simd_req, bus_req;
  logic          core_gnt, bus_gnt;
  logic [XW-1:0] core_rdata, bus_rdata;
  // scalar unit
  ctl_t          ctl;
  logic [XW-1:0] ra_val, rb_val, acc;
  logic          bypass_a, bypass_b, div_wait;
  // SIMD unit
  logic          v_issue, v_comp, v_busy;
  vop_t          v_op;
  logic [AW-1:0] v_waddr;
  // events
  logic          stall_bank, stall_drain, loop_back, wait_state;

  control_unit u_ctrl (
    .clk, .rst_n, .start, .start_pc, .running, .done, .cycles,
    .fetch_en, .fetch_addr, .instr,
    .ctl, .ra_val, .rb_val, .div_wait,
    .dmem_req(core_req), .dmem_gnt(core_gnt),
    .v_issue, .v_op, .v_comp, .v_waddr, .v_busy,
    .stall_bank, .stall_drain, .loop_back
  );

  scalar_unit u_scalar (
    .clk, .rst_n, .ctl, .ld_data(core_rdata), .ra_val, .rb_val, .acc, .bypass_a, .bypass_b, .div_wait
  );

  simd_unit u_simd (
    .clk, .rst_n, .issue(v_issue), .op(v_op), .comp(v_comp), .waddr(v_waddr),
    .mem_rdata(core_rdata), .wreq(simd_req), .busy(v_busy)
  );

  data_mem u_dmem (
    .clk, .rst_n, .simd_req, .core_req, .bus_req,
    .core_gnt, .bus_gnt, .core_rdata, .bus_rdata
  );

  inst_mem u_imem (
    .clk, .rst_n, .fetch_en(fetch_en && !imem_we), .fetch_addr, .instr,
    .wr_en(imem_we), .wr_addr(imem_addr), .wr_data(imem_wdata)
  );

  bus_if u_bus (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .start, .start_pc, .running, .done, .cycles,
    .imem_we, .imem_addr, .imem_wdata,
    .dmem_req(bus_req), .dmem_gnt(bus_gnt), .dmem_rdata(bus_rdata),
    .wait_state
  );

  assign irq = done;

endmodule
