// scalar_regs: register file of the scalar unit.
//
// N registers of W bits with two combinational read ports and two write
// ports. Write port 0 carries ALU results; write port 1 carries load data,
// which returns from data memory one cycle after the load and so may arrive
// together with a later instruction's result. If both ports write the same
// register in one cycle, port 0 (the younger instruction) wins. Writes take
// effect at the clock edge. Sixteen 32-bit registers are this design's
// choice; the document only lists the scalar registers as a block.
module scalar_regs
  import imp_pkg::*;
#(
  parameter int unsigned N = NREG,
  parameter int unsigned W = XW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ra,
  input  logic [$clog2(N)-1:0] rb,
  output logic [W-1:0]         da,
  output logic [W-1:0]         db,
  input  logic                 we0,
  input  logic [$clog2(N)-1:0] wa0,
  input  logic [W-1:0]         wd0,
  input  logic                 we1,
  input  logic [$clog2(N)-1:0] wa1,
  input  logic [W-1:0]         wd1
);

  logic [W-1:0] r [N];

  assign da = r[ra];
  assign db = r[rb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else begin
      if (we1 && wa1 != '0) r[wa1] <= wd1;
      if (we0 && wa0 != '0) r[wa0] <= wd0;
    end
  end

endmodule
