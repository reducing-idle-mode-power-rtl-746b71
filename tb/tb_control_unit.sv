// tb_control_unit: self-checking test of the control unit together with the
// scalar unit. The testbench models the instruction memory, the data-memory
// issue port (read data = 3*addr+1, grants withheld at random) and the busy
// flag of the SIMD pipeline. The program runs a hardware loop of VFIR (one
// issue per cycle when granted), a load straight after it (drain stall, then
// load-use bypass), a branch loop, stores and a jump over a store. The test
// checks every SIMD issue and its addresses, the stored values and addresses,
// that the hardware loop costs no cycles beyond the stalls, and that the run
// ends with `done`.
module tb_control_unit;
  import imp_pkg::*;
  import imp_asm_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] start_pc = '0;
  logic running, done;
  logic [XW-1:0] cycles;
  logic fetch_en;
  logic [AW-1:0] fetch_addr;
  logic [31:0] instr;
  ctl_t ctl;
  logic [XW-1:0] ra_val, rb_val, acc;
  logic bypass_a, bypass_b, div_wait;
  dmem_req_t dmem_req;
  logic dmem_gnt;
  logic v_issue, v_comp, v_busy;
  vop_t v_op;
  logic [AW-1:0] v_waddr;
  logic stall_bank, stall_drain, loop_back;
  int checks = 0, failures = 0;

  control_unit dut (.*);
  scalar_unit u_scalar (.clk, .rst_n, .ctl, .ld_data(rdata), .ra_val, .rb_val, .acc, .bypass_a, .bypass_b, .div_wait);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // instruction memory model
  logic [31:0] im [64];
  always_ff @(posedge clk) if (fetch_en) instr <= im[fetch_addr[5:0]];

  // data-memory issue port model
  logic [XW-1:0] rdata = '0;
  logic gnt_rand = 1;
  assign dmem_gnt = dmem_req.en && gnt_rand;
  always @(negedge clk) gnt_rand = ($urandom_range(3) != 0);
  always_ff @(posedge clk) if (dmem_gnt && !dmem_req.we) rdata <= 3 * XW'(dmem_req.addr) + 1;

  // SIMD pipeline occupancy model
  logic e1 = 0, e2 = 0;
  always_ff @(posedge clk) begin e1 <= v_issue; e2 <= e1; end
  assign v_busy = e1 || e2;

  int n_issue = 0, n_store = 0, n_bank = 0, n_drain = 0, n_loop = 0, n_bypass = 0;
  int first_issue = -1, last_issue = -1, cyc = 0, stall_in_loop = 0;
  logic [AW-1:0] st_addr [$];
  logic [XW-1:0] st_data [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stall_bank && rst_n) n_bank++;
    if (stall_drain && rst_n) n_drain++;
    if (loop_back && rst_n) n_loop++;
    if (rst_n && ctl.exec && (bypass_a || bypass_b)) n_bypass++;
    if (v_issue && rst_n) begin
      checks++;
      if (v_op != V_FIR || v_comp != 1'b1 || dmem_req.addr != AW'(100 + n_issue) || v_waddr != AW'(2000 + n_issue)) begin
        failures++; $display("FAIL issue %0d: op %0d rd %0d wr %0d", n_issue, v_op, dmem_req.addr, v_waddr);
      end
      if (first_issue < 0) first_issue = cyc;
      last_issue = cyc;
      n_issue++;
    end
    if (first_issue >= 0 && n_issue < 5 && stall_bank) stall_in_loop++;
    if (rst_n && dmem_gnt && dmem_req.we) begin st_addr.push_back(dmem_req.addr); st_data.push_back(dmem_req.wdata); end
  end

  initial begin
    for (int i = 0; i < 64; i++) im[i] = asm_r(OP_NOP, 0, 0, 0);
    im[0]  = asm_i(OP_ADDI, 1, 0, 5);
    im[1]  = asm_i(OP_SETAR, 1, 0, 100);
    im[2]  = asm_i(OP_SETAR, 2, 0, 2000);
    im[3]  = asm_r(OP_LOOP, 0, 1, 0);
    im[4]  = asm_i(OP_VFIR, 2, 1, 1, 1'b1);
    im[5]  = asm_i(OP_LD, 4, 1, 1);
    im[6]  = asm_r(OP_ADD, 5, 4, 4);
    im[7]  = asm_i(OP_ADDI, 2, 0, 3);
    im[8]  = asm_i(OP_ADDI, 3, 3, 7);
    im[9]  = asm_i(OP_ADDI, 2, 2, -1);
    im[10] = asm_i(OP_BNEZ, 0, 2, 8);
    im[11] = asm_i(OP_SETAR, 3, 0, 3000);
    im[12] = asm_st(3, 3, 1);
    im[13] = asm_st(3, 5, 1);
    im[14] = asm_i(OP_JMP, 0, 0, 16);
    im[15] = asm_st(3, 0, 1);
    im[16] = asm_r(OP_HALT, 0, 0, 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; start_pc = '0;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    checks++; if (n_issue != 5) begin failures++; $display("FAIL %0d issues", n_issue); end
    checks++; if (last_issue - first_issue != 4 + stall_in_loop) begin
      failures++; $display("FAIL loop took %0d cycles with %0d stalls", last_issue - first_issue + 1, stall_in_loop); end
    checks++; if (st_addr.size() != 2) begin failures++; $display("FAIL %0d stores", st_addr.size()); end
    else begin
      checks++; if (st_addr[0] != 3000 || st_data[0] != 21) begin failures++; $display("FAIL store0 %0d %0d", st_addr[0], st_data[0]); end
      checks++; if (st_addr[1] != 3001 || st_data[1] != 2 * (3 * 105 + 1)) begin failures++; $display("FAIL store1 %0d %0d", st_addr[1], st_data[1]); end
    end
    checks++; if (running || cycles == 0) begin failures++; $display("FAIL run state"); end
    checks++; if (n_drain == 0 || n_bank == 0 || n_loop != 4 || n_bypass == 0) begin
      failures++; $display("FAIL events drain=%0d bank=%0d loop=%0d bypass=%0d", n_drain, n_bank, n_loop, n_bypass); end
    $display("cycles=%0d drain=%0d bank=%0d loop=%0d bypass=%0d", cycles, n_drain, n_bank, n_loop, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
