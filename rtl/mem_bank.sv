// mem_bank: one single-port memory sub-bank.
//
// The memory unit of the processor is split into small sub-banks so that an
// access only switches the one bank it addresses, and each sub-bank has a
// single port; both points follow the document. This module is that sub-bank:
// a synchronous array with one read-or-write port per cycle. A read issued
// with en=1, we=0 returns mem[addr] on rdata in the following cycle; rdata
// holds its value while the bank is not read. A write (en=1, we=1) updates the
// word at the clock edge and leaves rdata unchanged. The depth and width are
// parameters; 1024 x 32 bits is this design's choice.
module mem_bank #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
