// tb_data_mem: self-checking test of the banked data memory and its per-bank
// arbitration. Random traffic on the three ports is checked against a model:
// grants follow the priority rule (SIMD > core > bus in the same bank, all
// three in parallel in different banks), granted writes land, and read data
// comes back to the right port one cycle after its grant.
module tb_data_mem;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0;
  dmem_req_t simd_req, core_req, bus_req;
  logic core_gnt, bus_gnt;
  logic [XW-1:0] core_rdata, bus_rdata;
  int checks = 0, failures = 0;
  int n_par = 0, n_core_blk = 0, n_bus_blk = 0;

  data_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [XW-1:0] model [int];
  function automatic logic [XW-1:0] rd(int a);
    return model.exists(a) ? model[a] : '0;
  endfunction

  // addresses drawn from a few banks so that collisions are frequent
  function automatic logic [AW-1:0] raddr();
    int b = $urandom_range(3) * 7;
    return AW'(b * BANK_WORDS + $urandom_range(15));
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    simd_req = '0; core_req = '0; bus_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill the test area through the bus port
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        bus_req = '{en: 1, we: 1, addr: AW'(b * 7 * BANK_WORDS + i), wdata: $urandom};
        #1 chk(bus_gnt, "bus write granted when alone");
        model[b * 7 * BANK_WORDS + i] = bus_req.wdata;
      end
    @(negedge clk); bus_req = '0;
    for (int t = 0; t < 3000; t++) begin
      bit core_rd, bus_rd, sb_core, sb_bus, eg_core, eg_bus;
      logic [XW-1:0] ec, eb;
      @(negedge clk);
      simd_req = '{en: $urandom_range(1), we: 1, addr: raddr(), wdata: $urandom};
      core_req = '{en: $urandom_range(1), we: $urandom_range(1), addr: raddr(), wdata: $urandom};
      bus_req  = '{en: $urandom_range(1), we: $urandom_range(1), addr: raddr(), wdata: $urandom};
      #1;
      sb_core = simd_req.en && simd_req.addr[AW-1:10] == core_req.addr[AW-1:10];
      eg_core = core_req.en && !sb_core;
      sb_bus  = (simd_req.en && simd_req.addr[AW-1:10] == bus_req.addr[AW-1:10]) ||
                (core_req.en && core_req.addr[AW-1:10] == bus_req.addr[AW-1:10]);
      eg_bus  = bus_req.en && !sb_bus;
      chk(core_gnt == eg_core, "core grant");
      chk(bus_gnt == eg_bus, "bus grant");
      if (core_req.en && sb_core) n_core_blk++;
      if (bus_req.en && sb_bus) n_bus_blk++;
      if (simd_req.en && eg_core && eg_bus) n_par++;
      core_rd = eg_core && !core_req.we; bus_rd = eg_bus && !bus_req.we;
      ec = rd(int'(core_req.addr)); eb = rd(int'(bus_req.addr));
      if (simd_req.en) model[int'(simd_req.addr)] = simd_req.wdata;
      if (eg_core && core_req.we) model[int'(core_req.addr)] = core_req.wdata;
      if (eg_bus && bus_req.we) model[int'(bus_req.addr)] = bus_req.wdata;
      @(posedge clk); #1;
      if (core_rd) chk(core_rdata == ec, "core read data");
      if (bus_rd)  chk(bus_rdata == eb, "bus read data");
    end
    // address beyond the last bank reads as zero
    @(negedge clk); simd_req = '0; bus_req = '0;
    core_req = '{en: 1, we: 0, addr: AW'(NBANKS * BANK_WORDS + 3), wdata: '0};
    @(posedge clk); #1 chk(core_rdata == '0, "out of range read is zero");
    chk(n_par > 0 && n_core_blk > 0 && n_bus_blk > 0, "all arbitration cases seen");
    $display("parallel=%0d core_blocked=%0d bus_blocked=%0d", n_par, n_core_blk, n_bus_blk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
