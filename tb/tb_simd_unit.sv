// tb_simd_unit: self-checking test of the three-stage SIMD pipeline.
// A small data-memory model answers reads one cycle after issue. The test
// loads 32 coefficients (V_SH2), fills the delay line (V_SH1), then issues one
// V_FIR per cycle and checks every output value, its address, that it is
// written exactly two cycles after issue, and the rate of one output per cycle.
// A second pass runs the +/-1 complement mode.
module tb_simd_unit;
  import imp_pkg::*;
  localparam int NX = 96;
  logic clk = 0, rst_n = 0, issue = 0, comp = 0, busy;
  vop_t op = V_SH1;
  logic [AW-1:0] waddr = '0;
  logic [XW-1:0] mem_rdata = '0;
  dmem_req_t wreq;
  int checks = 0, failures = 0;
  int cyc = 0;

  simd_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic signed [15:0] c [LANES];
  logic signed [15:0] x [NX];
  // read-data pipe: the value presented at issue appears on mem_rdata next cycle
  logic [XW-1:0] rd_next = '0;
  always @(posedge clk) mem_rdata <= rd_next;

  // expected outputs, recorded with the cycle they must be written in
  int exp_cyc [$];
  logic [XW-1:0] exp_val [$];
  logic [AW-1:0] exp_adr [$];
  int writes = 0;

  always @(negedge clk) if (rst_n && wreq.en) begin
    writes++;
    checks++;
    if (exp_cyc.size() == 0) begin failures++; $display("FAIL unexpected write"); end
    else begin
      int ec; logic [XW-1:0] ev; logic [AW-1:0] ea;
      ec = exp_cyc.pop_front(); ev = exp_val.pop_front(); ea = exp_adr.pop_front();
      if (!wreq.we || wreq.wdata !== ev || wreq.addr !== ea || cyc != ec) begin
        failures++; $display("FAIL write cyc %0d (exp %0d) val %h (exp %h) adr %0d (exp %0d)", cyc, ec, wreq.wdata, ev, wreq.addr, ea);
      end
    end
  end

  task automatic step(vop_t o, logic [15:0] d, logic cm, logic [AW-1:0] wa);
    @(negedge clk);
    issue = 1; op = o; comp = cm; waddr = wa; rd_next = XW'($signed(d));
  endtask

  function automatic logic [XW-1:0] fir(int n, bit cm);
    longint s = 0;
    for (int i = 0; i < LANES; i++) begin
      longint xv = longint'(x[n+i]);
      s += cm ? (c[i] < 0 ? -xv : xv) : xv * longint'(c[i]);
    end
    if (s > 64'sd2147483647) s = 64'sd2147483647;
    if (s < -64'sd2147483648) s = -64'sd2147483648;
    return XW'(s);
  endfunction

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      int first_cyc;
      for (int i = 0; i < LANES; i++) c[i] = pass ? ($urandom_range(1) ? -16'sd1 : 16'sd1) : 16'($urandom);
      for (int i = 0; i < NX; i++)    x[i] = 16'($urandom);
      if (pass == 0) begin x[40] = 16'sh8000; end
      rst_n = pass[0] ? rst_n : 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int i = 0; i < LANES; i++) step(V_SH2, c[i], 0, '0);
      for (int i = 0; i < LANES - 1; i++) step(V_SH1, x[i], 0, '0);
      for (int n = 0; n + LANES <= NX; n++) begin
        step(V_FIR, x[n + LANES - 1], pass[0], AW'(1000 + n));
        exp_cyc.push_back(cyc + 2); exp_val.push_back(fir(n, pass[0])); exp_adr.push_back(AW'(1000 + n));
        if (n == 0) first_cyc = cyc;
      end
      @(negedge clk); issue = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low with ops in flight"); end
      repeat (4) @(negedge clk);
      checks++;
      if (busy || exp_cyc.size() != 0) begin failures++; $display("FAIL pipeline did not drain"); end
      checks++;
      if (writes != (pass + 1) * (NX - LANES + 1)) begin failures++; $display("FAIL %0d writes", writes); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
