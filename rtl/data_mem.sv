// data_mem: the banked data memory of the idle mode processor.
//
// 100 Kbytes of data memory (the document's estimate) built from NBANKS
// single-port sub-banks of BANK_WORDS 32-bit words. A word address selects its
// bank by its upper bits, so each access enables exactly one bank, and
// accesses that fall in different banks proceed in the same cycle. The
// document asks for data to be spread over the banks so that reads and writes
// run in parallel; here the FIR input and output buffers are placed in
// different banks by software.
//
// Three request ports, each a dmem_req_t, are arbitrated per bank with fixed
// priority (this design's choice):
//   simd_req  execution-2 write-back of the SIMD unit, always served;
//   core_req  the issue stage (scalar load/store, SIMD operand read), served
//             unless it hits the bank the SIMD port writes (core_gnt=0 then,
//             and the control unit holds the instruction for a cycle);
//   bus_req   the system bus, served only when neither other port uses its
//             bank (bus_gnt).
// Read data appears on core_rdata / bus_rdata in the cycle after the grant and
// stays until that port's next read. Addresses beyond the last bank are
// ignored and read as zero.
module data_mem
  import imp_pkg::*;
#(
  parameter int unsigned NB = NBANKS,
  parameter int unsigned BW = BANK_WORDS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  dmem_req_t simd_req,
  input  dmem_req_t core_req,
  input  dmem_req_t bus_req,
  output logic      core_gnt,
  output logic      bus_gnt,
  output logic [XW-1:0] core_rdata,
  output logic [XW-1:0] bus_rdata
);

  localparam int unsigned OW = $clog2(BW);
  localparam int unsigned BI = AW - OW;   // bank index width

  logic [BI-1:0] simd_b, core_b, bus_b;
  logic          simd_ok, core_ok, bus_ok;

  assign simd_b  = simd_req.addr[AW-1:OW];
  assign core_b  = core_req.addr[AW-1:OW];
  assign bus_b   = bus_req.addr[AW-1:OW];
  assign simd_ok = int'(simd_b) < NB;
  assign core_ok = int'(core_b) < NB;
  assign bus_ok  = int'(bus_b)  < NB;

  assign core_gnt = core_req.en && !(simd_req.en && simd_b == core_b);
  assign bus_gnt  = bus_req.en && !(simd_req.en && simd_b == bus_b)
                               && !(core_req.en && core_b == bus_b);

  logic [XW-1:0] rdata [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic          en, we;
    logic [OW-1:0] addr;
    logic [XW-1:0] wdata;

    always_comb begin
      en = 1'b0; we = 1'b0; addr = '0; wdata = '0;
      if (simd_req.en && simd_ok && int'(simd_b) == b) begin
        en = 1'b1; we = simd_req.we; addr = simd_req.addr[OW-1:0]; wdata = simd_req.wdata;
      end else if (core_gnt && core_ok && int'(core_b) == b) begin
        en = 1'b1; we = core_req.we; addr = core_req.addr[OW-1:0]; wdata = core_req.wdata;
      end else if (bus_gnt && bus_ok && int'(bus_b) == b) begin
        en = 1'b1; we = bus_req.we; addr = bus_req.addr[OW-1:0]; wdata = bus_req.wdata;
      end
    end

    mem_bank #(.WORDS(BW), .WIDTH(XW)) u_bank (
      .clk, .en, .we, .addr, .wdata, .rdata(rdata[b])
    );
  end

  // Remember which bank each port read so its data can be routed back.
  logic [BI-1:0] core_rb, bus_rb;
  logic          core_rv, bus_rv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_rb <= '0; bus_rb <= '0; core_rv <= 1'b0; bus_rv <= 1'b0;
    end else begin
      if (core_gnt && !core_req.we) begin
        core_rb <= core_b; core_rv <= core_ok;
      end
      if (bus_gnt && !bus_req.we) begin
        bus_rb <= bus_b; bus_rv <= bus_ok;
      end
    end
  end

  assign core_rdata = core_rv ? rdata[core_rb] : '0;
  assign bus_rdata  = bus_rv  ? rdata[bus_rb]  : '0;

  // No two ports may be granted the same bank.
  a_one_per_bank : assert property (@(posedge clk) disable iff (!rst_n)
    !(core_gnt && bus_gnt && core_b == bus_b));
  a_simd_core : assert property (@(posedge clk) disable iff (!rst_n)
    !(core_gnt && simd_req.en && core_b == simd_b));

endmodule
