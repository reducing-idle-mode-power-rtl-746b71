// inst_mem: the banked instruction memory of the idle mode processor.
//
// 100 Kbytes of program memory (the document's estimate) in NBANKS single-port
// sub-banks of 32-bit instruction words; only the addressed bank is enabled.
// The control unit fetches one instruction per cycle: fetch_addr presented in
// one cycle gives instr in the next. The system bus loads the program through
// the write port, which takes the banks' single port and is meant to be used
// while the core is stopped (the write wins if both are asserted). The
// single-port banking follows the document; the sizes and the write-port rule
// are this design's choices.
module inst_mem
  import imp_pkg::*;
#(
  parameter int unsigned NB = NBANKS,
  parameter int unsigned BW = BANK_WORDS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fetch_en,
  input  logic [AW-1:0] fetch_addr,
  output logic [31:0]   instr,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data
);

  localparam int unsigned OW = $clog2(BW);
  localparam int unsigned BI = AW - OW;

  logic [AW-1:0] a;
  logic [BI-1:0] ab;
  assign a  = wr_en ? wr_addr : fetch_addr;
  assign ab = a[AW-1:OW];

  logic [31:0] rdata [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic en;
    assign en = (wr_en || fetch_en) && int'(ab) == b;
    mem_bank #(.WORDS(BW), .WIDTH(32)) u_bank (
      .clk, .en, .we(wr_en), .addr(a[OW-1:0]), .wdata(wr_data), .rdata(rdata[b])
    );
  end

  logic [BI-1:0] rb;
  logic          rv;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb <= '0; rv <= 1'b0;
    end else if (fetch_en && !wr_en) begin
      rb <= ab; rv <= int'(ab) < NB;
    end
  end

  assign instr = rv ? rdata[rb] : '0;

endmodule
