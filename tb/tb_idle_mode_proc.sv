// tb_idle_mode_proc: end-to-end test of the idle mode processor at its default
// size. A host model on APB loads data and programs, starts each program and
// reads the results back, which are compared with values computed here.
// Programs (each ends with HALT):
//   P1  32-tap pulse-shaping FIR, multiply mode, input and output in
//       different banks: checks every output and the rate of one output per
//       cycle through the exact cycle count;
//   P2  32-chip matched filter against a +/-1 code in complement mode, while
//       the host polls the output bank (bus wait states);
//   P3  the same FIR with input and output in one bank (bank-conflict stalls);
//   P4  a 64-tap filter as two 32-wide chunks whose partial outputs are added
//       by the scalar unit;
//   P5  the sliding-window autocorrelation of the frame detector on the scalar
//       unit, updated with y[n] = y[n-1] - P[0,n-1] + P[L-1,n] and the stored
//       products;
//   P6  signed division and remainder of P1 outputs by input samples on the
//       iterative divider;
//   P7  a 300-tap filter as ten 32-wide chunks (the last one padded with
//       zero taps), each chunk's partial outputs added into a running sum by
//       the scalar unit.
// It counts each mechanism (hardware loop-back, bank stall, drain stall, load
// bypass, divide wait, complement mode, bus wait, instruction-memory write refused while
// running) and fails if one never happened.
module tb_idle_mode_proc;
  import imp_pkg::*;
  import imp_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [19:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr, irq;
  int checks = 0, failures = 0;

  idle_mode_proc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------------------------------------------------------- events
  int n_loop = 0, n_bank = 0, n_drain = 0, n_bypass = 0, n_comp = 0, n_wait = 0, n_err = 0, n_div = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.loop_back)   n_loop++;
    if (dut.stall_bank)  n_bank++;
    if (dut.stall_drain) n_drain++;
    if (dut.ctl.exec && (dut.bypass_a || dut.bypass_b)) n_bypass++;
    if (dut.v_issue && dut.v_op == V_FIR && dut.v_comp) n_comp++;
    if (dut.wait_state)  n_wait++;
    if (dut.div_wait)    n_div++;
  end

  // ---------------------------------------------------------------- APB host
  task automatic apb(input bit wr, input logic [19:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output bit err);
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    #1;
    while (!pready) begin @(negedge clk); #1; end
    rd = prdata; err = pslverr;
    @(posedge clk); #1 psel = 0; penable = 0;
  endtask

  task automatic dwr(int a, logic [31:0] d);
    logic [31:0] r; bit e;
    apb(1, 20'h80000 + 20'(a * 4), d, r, e);
  endtask

  task automatic drd(int a, output logic [31:0] d);
    bit e;
    apb(0, 20'h80000 + 20'(a * 4), 0, d, e);
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- programs
  logic [31:0] prog [$];
  task automatic emit(logic [31:0] w); prog.push_back(w); endtask

  // one 32-wide FIR chunk: coefficients at c, input at x, K outputs to y
  task automatic emit_fir(int c, int x, int y, int k, bit comp);
    emit(asm_i(OP_SETAR, 0, 0, c));
    emit(asm_i(OP_ADDI, 1, 0, LANES));
    emit(asm_r(OP_LOOP, 0, 1, 0));
    emit(asm_i(OP_VSH2, 0, 0, 0, 1'b1));
    emit(asm_i(OP_SETAR, 1, 0, x));
    emit(asm_i(OP_ADDI, 1, 0, LANES - 1));
    emit(asm_r(OP_LOOP, 0, 1, 0));
    emit(asm_i(OP_VSH1, 0, 1, 0, 1'b1));
    emit(asm_i(OP_SETAR, 2, 0, y));
    emit(asm_i(OP_ADDI, 1, 0, k));
    emit(asm_r(OP_LOOP, 0, 1, 0));
    emit(asm_i(OP_VFIR, 2, 1, comp, 1'b1));
  endtask

  // load the program at base over the bus, then start it; returns cycles
  task automatic run(int base, bit poll_bank2, output int cyc);
    logic [31:0] r, st; bit e;
    for (int i = 0; i < prog.size(); i++) apb(1, 20'h40000 + 20'((base + i) * 4), prog[i], r, e);
    prog.delete();
    apb(1, 20'h00004, base, r, e);
    apb(1, 20'h00000, 1, r, e);
    if (poll_bank2) begin
      // while the filter runs: a program write must be refused, and reads of
      // the bank the SIMD unit writes wait for it
      apb(1, 20'h40000, 0, r, e);
      if (e) n_err++;
      for (int i = 0; i < 16; i++) drd(2 * BANK_WORDS + i, r);
    end
    do apb(0, 20'h00008, 0, st, e); while (!st[1]);
    chk(irq, "irq raised at halt");
    apb(0, 20'h0000C, 0, r, e);
    cyc = int'(r);
  endtask

  // ---------------------------------------------------------------- data
  localparam int K    = 64;              // outputs per filter run
  localparam int NX   = 2 * LANES + K;   // input samples
  localparam int XB   = 1 * BANK_WORDS;  // input samples
  localparam int CB   = 0;               // coefficients (64) then the code (32)
  localparam int SB   = 96;              // +/-1 code
  localparam int Y1   = 2 * BANK_WORDS;
  localparam int Y2   = 3 * BANK_WORDS;
  localparam int Y3   = 1 * BANK_WORDS + 512;
  localparam int YA   = 4 * BANK_WORDS;
  localparam int YB   = 5 * BANK_WORDS;
  localparam int YS   = 6 * BANK_WORDS;
  localparam int QB   = 7 * BANK_WORDS;
  localparam int WB   = 8 * BANK_WORDS;
  localparam int SWL  = 16;              // sliding-window length L
  localparam int SWD  = 16;              // delay D
  localparam int SWM  = 48;              // sliding-window outputs
  localparam int LT   = 300;             // taps of the long filter (P7)
  localparam int NCH  = (LT + LANES - 1) / LANES;
  localparam int NX7  = NCH * LANES + K;
  localparam int X7   = 10 * BANK_WORDS; // long-filter input
  localparam int C7   = 11 * BANK_WORDS; // long-filter taps, zero-padded
  localparam int P7   = 12 * BANK_WORDS; // one chunk's partial outputs
  localparam int S7   = 13 * BANK_WORDS; // running sum

  logic signed [15:0] x [NX];
  logic signed [15:0] c [2 * LANES];
  logic signed [15:0] code [LANES];
  logic signed [15:0] x7 [NX7];
  logic signed [15:0] c7 [NCH * LANES];

  function automatic longint sat(longint s);
    if (s > 64'sd2147483647) return 64'sd2147483647;
    if (s < -64'sd2147483648) return -64'sd2147483648;
    return s;
  endfunction

  function automatic logic [31:0] fir_ref(int n, int coff, bit comp);
    longint s = 0;
    for (int i = 0; i < LANES; i++) begin
      longint xv = longint'(x[n + i]);
      if (comp) s += (code[i] < 0) ? -xv : xv;
      else      s += xv * longint'(c[coff + i]);
    end
    return 32'(sat(s));
  endfunction

  initial begin
    logic [31:0] r;
    int cyc1, cyc2, cyc3, cyc4, cyc5, cyc6, cyc7;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int i = 0; i < NX; i++)        x[i] = (i % 5 == 0) ? 16'($urandom) : 16'($signed(12'($urandom)));
    for (int i = 0; i < 2 * LANES; i++) c[i] = 16'($signed(10'($urandom)));
    for (int i = 0; i < LANES; i++)     code[i] = $urandom_range(1) ? -16'sd1 : 16'sd1;
    for (int i = 0; i < NX; i++)        dwr(XB + i, 32'($signed(x[i])));
    for (int i = 0; i < 2 * LANES; i++) dwr(CB + i, 32'($signed(c[i])));
    for (int i = 0; i < LANES; i++)     dwr(SB + i, 32'($signed(code[i])));

    // P1: pulse-shaping FIR
    emit_fir(CB, XB, Y1, K, 0);
    emit(asm_r(OP_HALT, 0, 0, 0));
    run(0, 0, cyc1);
    for (int n = 0; n < K; n++) begin drd(Y1 + n, r); chk(r == fir_ref(n, 0, 0), $sformatf("P1 y[%0d]", n)); end
    // 12 set-up instructions less the 3 loop bodies, 32 + 31 + K loop
    // iterations, HALT, and 2 cycles for the last output to leave the pipeline
    chk(cyc1 == 9 + LANES + (LANES - 1) + K + 1 + 2, $sformatf("P1 cycle count %0d", cyc1));

    // P2: matched filter, complement mode, host polling during the run
    emit_fir(SB, XB, Y2, K, 1);
    emit(asm_r(OP_HALT, 0, 0, 0));
    run(100, 1, cyc2);
    for (int n = 0; n < K; n++) begin drd(Y2 + n, r); chk(r == fir_ref(n, 0, 1), $sformatf("P2 y[%0d]", n)); end

    // P3: output in the input bank
    emit_fir(CB, XB, Y3, K, 0);
    emit(asm_r(OP_HALT, 0, 0, 0));
    run(200, 0, cyc3);
    for (int n = 0; n < K; n++) begin drd(Y3 + n, r); chk(r == fir_ref(n, 0, 0), $sformatf("P3 y[%0d]", n)); end
    chk(cyc3 > cyc1, "P3 slower than P1 because of bank conflicts");

    // P4: 64-tap filter in two chunks, summed by the scalar unit
    emit_fir(CB, XB, YA, K, 0);
    emit_fir(CB + LANES, XB + LANES, YB, K, 0);
    emit(asm_i(OP_SETAR, 0, 0, YA));
    emit(asm_i(OP_SETAR, 1, 0, YB));
    emit(asm_i(OP_SETAR, 2, 0, YS));
    emit(asm_i(OP_ADDI, 1, 0, K));
    emit(asm_r(OP_LOOP, 0, 1, 0));
    emit(asm_i(OP_LD, 4, 0, 1));
    emit(asm_i(OP_LD, 5, 1, 1));
    emit(asm_r(OP_ADD, 6, 4, 5));
    emit(asm_st(2, 6, 1, 1'b1));
    emit(asm_r(OP_HALT, 0, 0, 0));
    run(300, 0, cyc4);
    for (int n = 0; n < K; n++) begin
      drd(YS + n, r);
      chk(r == 32'(longint'($signed(fir_ref(n, 0, 0))) + longint'($signed(fir_ref(n + LANES, LANES, 0)))),
          $sformatf("P4 y[%0d]", n));
    end

    // P5: sliding-window autocorrelation on the scalar unit
    //   Q[k] = x[k] * x[k-D] is stored at QB + k; y[n] = sum_{i<L} Q[n+i]
    emit(asm_i(OP_SETAR, 0, 0, XB + SWD));
    emit(asm_i(OP_SETAR, 1, 0, XB));
    emit(asm_i(OP_SETAR, 3, 0, QB + SWD));
    emit(asm_i(OP_SETAR, 2, 0, QB + SWD));
    emit(asm_i(OP_SETAR, 4, 0, WB));
    emit(asm_i(OP_ADDI, 9, 0, 1));
    emit(asm_r(OP_MTACC, 0, 0, 0));
    emit(asm_i(OP_ADDI, 1, 0, SWL));
    emit(asm_r(OP_LOOP, 0, 1, 0));
    emit(asm_i(OP_LD, 4, 0, 1));          // x[k]
    emit(asm_i(OP_LD, 5, 1, 1));          // x[k-D]
    emit(asm_r(OP_MUL, 6, 4, 5));         // Q[k]
    emit(asm_r(OP_MAC, 0, 4, 5));         // acc += Q[k]
    emit(asm_st(3, 6, 1, 1'b1));          // store Q[k]
    emit(asm_r(OP_MFACC, 7, 0, 0));
    emit(asm_st(4, 7, 1));                // y[D]
    emit(asm_i(OP_ADDI, 1, 0, SWM - 1));
    emit(asm_r(OP_LOOP, 0, 1, 0));
    emit(asm_i(OP_LD, 4, 0, 1));          // x[n+L-1]
    emit(asm_i(OP_LD, 5, 1, 1));          // x[n+L-1-D]
    emit(asm_i(OP_LD, 8, 2, 1));          // P[0,n-1] = Q[n-1], reused
    emit(asm_r(OP_MUL, 6, 4, 5));         // P[L-1,n]
    emit(asm_st(3, 6, 1));
    emit(asm_r(OP_MAC, 0, 4, 5));
    emit(asm_r(OP_MSU, 0, 8, 9));
    emit(asm_r(OP_MFACC, 7, 0, 0));
    emit(asm_st(4, 7, 1, 1'b1));
    emit(asm_r(OP_HALT, 0, 0, 0));
    run(400, 0, cyc5);
    for (int m = 0; m < SWM; m++) begin
      longint s;
      s = 0;
      for (int i = 0; i < SWL; i++) s += longint'(x[SWD + m + i]) * longint'(x[m + i]);
      drd(WB + m, r);
      chk(r == 32'(s), $sformatf("P5 y[%0d] got %0d exp %0d", m, $signed(r), s));
    end

    // P6: division on the scalar unit
    emit(asm_i(OP_SETAR, 0, 0, Y1));
    emit(asm_i(OP_SETAR, 1, 0, XB));
    emit(asm_i(OP_SETAR, 2, 0, WB + 64));
    emit(asm_i(OP_ADDI, 1, 0, 8));
    emit(asm_r(OP_LOOP, 0, 1, 0));
    emit(asm_i(OP_LD, 4, 0, 1));
    emit(asm_i(OP_LD, 5, 1, 1));
    emit(asm_r(OP_DIV, 6, 4, 5));
    emit(asm_r(OP_REM, 7, 4, 5));
    emit(asm_st(2, 6, 1));
    emit(asm_st(2, 7, 1, 1'b1));
    emit(asm_r(OP_HALT, 0, 0, 0));
    run(500, 0, cyc6);
    for (int n = 0; n < 8; n++) begin
      logic signed [31:0] yv, xv, eq, er;
      yv = fir_ref(n, 0, 0); xv = 32'($signed(x[n]));
      if (xv == 0) begin eq = -1; er = yv; end
      else begin eq = yv / xv; er = yv % xv; end
      drd(WB + 64 + 2 * n, r);     chk(r == eq, $sformatf("P6 q[%0d]", n));
      drd(WB + 64 + 2 * n + 1, r); chk(r == er, $sformatf("P6 r[%0d]", n));
    end
    chk(cyc6 >= 16 * (XW + 2), "P6 divides take their full latency");

    // P7: 300-tap filter; chunk 0 writes the sum buffer, each later chunk
    // writes its partial outputs, which a scalar loop adds into the sum
    for (int i = 0; i < NX7; i++)         x7[i] = 16'($signed(12'($urandom)));
    for (int i = 0; i < NCH * LANES; i++) c7[i] = (i < LT) ? 16'($signed(10'($urandom))) : 16'sd0;
    for (int i = 0; i < NX7; i++)         dwr(X7 + i, 32'($signed(x7[i])));
    for (int i = 0; i < NCH * LANES; i++) dwr(C7 + i, 32'($signed(c7[i])));
    emit_fir(C7, X7, S7, K, 0);
    for (int k = 1; k < NCH; k++) begin
      emit_fir(C7 + k * LANES, X7 + k * LANES, P7, K, 0);
      emit(asm_i(OP_SETAR, 3, 0, S7));
      emit(asm_i(OP_SETAR, 4, 0, P7));
      emit(asm_i(OP_SETAR, 5, 0, S7));
      emit(asm_i(OP_ADDI, 1, 0, K));
      emit(asm_r(OP_LOOP, 0, 1, 0));
      emit(asm_i(OP_LD, 4, 3, 1));
      emit(asm_i(OP_LD, 5, 4, 1));
      emit(asm_r(OP_ADD, 6, 4, 5));
      emit(asm_st(5, 6, 1, 1'b1));
    end
    emit(asm_r(OP_HALT, 0, 0, 0));
    run(600, 0, cyc7);
    for (int n = 0; n < K; n++) begin
      logic [31:0] e7;
      e7 = 0;
      for (int k = 0; k < NCH; k++) begin
        longint s;
        s = 0;
        for (int i = 0; i < LANES; i++)
          s += longint'(x7[n + k * LANES + i]) * longint'(c7[k * LANES + i]);
        e7 += 32'(sat(s));
      end
      drd(S7 + n, r);
      chk(r == e7, $sformatf("P7 y[%0d] got %0d exp %0d", n, $signed(r), $signed(e7)));
    end
    // every chunk: 9 set-up cycles, 32 + 31 + K loop iterations; every later
    // chunk adds K outputs in a 4-instruction loop, so the run is at least this
    chk(cyc7 >= NCH * (9 + 2 * LANES - 1 + K) + (NCH - 1) * 4 * K, $sformatf("P7 cycle count %0d", cyc7));

    $display("cycles: P1=%0d P2=%0d P3=%0d P4=%0d P5=%0d P6=%0d P7=%0d", cyc1, cyc2, cyc3, cyc4, cyc5, cyc6, cyc7);
    $display("events: loop=%0d bank=%0d drain=%0d bypass=%0d div=%0d comp=%0d wait=%0d imem_err=%0d",
             n_loop, n_bank, n_drain, n_bypass, n_div, n_comp, n_wait, n_err);
    chk(n_loop > 0,   "hardware loop-back happened");
    chk(n_bank > 0,   "bank-conflict stall happened");
    chk(n_drain > 0,  "drain stall happened");
    chk(n_bypass > 0, "load bypass happened");
    chk(n_div > 0,    "divide wait happened");
    chk(n_comp == K,  "complement mode used for every P2 output");
    chk(n_wait > 0,   "bus wait state happened");
    chk(n_err == 1,   "program write refused while running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
