// tb_bus_if: self-checking test of the APB client. An APB master task drives
// transfers; the testbench models the data-memory bus port (grants withheld
// for a random number of cycles, read data one cycle after the grant) and the
// run-control inputs. Checked: register reads and writes, the start pulse,
// instruction-memory writes and their PSLVERR while running, data-memory
// writes and reads with the wait states they need.
module tb_bus_if;
  import imp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [19:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic start, running = 0, done = 0;
  logic [AW-1:0] start_pc, imem_addr;
  logic [XW-1:0] cycles = 32'd1234;
  logic imem_we;
  logic [31:0] imem_wdata;
  dmem_req_t dmem_req;
  logic dmem_gnt;
  logic [XW-1:0] dmem_rdata;
  logic wait_state;
  int checks = 0, failures = 0, n_wait = 0, n_start = 0, n_imem = 0;

  bus_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // data-memory port model: busy for a random time, then grants
  logic [XW-1:0] mem [1024];
  int busy_left = 0;
  assign dmem_gnt = dmem_req.en && busy_left == 0;
  always @(posedge clk) begin
    if (rst_n && wait_state) n_wait++;
    if (rst_n && start) n_start++;
    if (rst_n && imem_we) begin
      n_imem++;
      checks++;
      if (imem_addr != AW'(77) || imem_wdata != 32'hCAFE_0001) begin failures++; $display("FAIL imem write"); end
    end
    if (busy_left > 0) busy_left--;
    else if (!dmem_req.en) busy_left = $urandom_range(3);
    if (dmem_gnt) begin
      if (dmem_req.we) mem[dmem_req.addr[9:0]] <= dmem_req.wdata;
      else dmem_rdata <= mem[dmem_req.addr[9:0]];
    end
  end

  task automatic apb(input bit wr, input logic [19:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output bit err);
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    #1;
    while (!pready) begin @(negedge clk); #1; end
    rd = prdata; err = pslverr;
    @(posedge clk); #1 psel = 0; penable = 0;
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] r; bit e;
    logic [31:0] model [1024];
    repeat (2) @(negedge clk);
    rst_n = 1;
    apb(1, 20'h00004, 32'd321, r, e);        chk(start_pc == AW'(321) && !e, "START_PC write");
    apb(0, 20'h00004, 0, r, e);              chk(r == 321, "START_PC read");
    apb(0, 20'h0000C, 0, r, e);              chk(r == 1234, "CYCLES read");
    done = 1;
    apb(0, 20'h00008, 0, r, e);              chk(r == 32'h2, "STATUS read");
    apb(1, 20'h40000 + 77*4, 32'hCAFE_0001, r, e); chk(!e, "IMEM write while stopped");
    apb(1, 20'h00000, 32'h1, r, e);          chk(n_start == 1, "start pulse");
    running = 1;
    apb(1, 20'h40000 + 77*4, 32'hDEAD_0000, r, e); chk(e, "IMEM write while running errs");
    chk(n_imem == 1, "only one IMEM write");
    for (int i = 0; i < 40; i++) begin
      model[i] = $urandom;
      apb(1, 20'h80000 + 20'(i*4), model[i], r, e);
      chk(!e, "DMEM write");
    end
    for (int i = 0; i < 40; i++) begin
      int k;
      k = (i * 7) % 40;
      apb(0, 20'h80000 + 20'(k*4), 0, r, e);
      chk(r == model[k], "DMEM read");
    end
    chk(n_wait > 0, "wait states happened");
    $display("waits=%0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
