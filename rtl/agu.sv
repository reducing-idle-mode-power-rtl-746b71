// agu: hardware address generators of the control unit.
//
// The document automates the address arithmetic of the FIR loop, (AR1++) for
// the input stream and (AR2++) for the output stream, so no separate
// increment instructions are needed. This unit holds NAR address registers
// and serves two of them per cycle: port a (source stream) and port b
// (destination stream). addr_a/addr_b show the selected registers' current
// values combinationally; inc_a/inc_b add one to them at the clock edge
// (post-increment). set_en loads register set_sel with set_val; a set and an
// increment of the same register in one cycle leave the set value. Eight
// registers and a fixed step of one are this design's choices. Reset clears
// all registers.
module agu
  import imp_pkg::*;
#(
  parameter int unsigned N = NAR
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] sel_a,
  input  logic [$clog2(N)-1:0] sel_b,
  input  logic                 inc_a,
  input  logic                 inc_b,
  output logic [AW-1:0]        addr_a,
  output logic [AW-1:0]        addr_b,
  input  logic                 set_en,
  input  logic [$clog2(N)-1:0] set_sel,
  input  logic [AW-1:0]        set_val
);

  logic [AW-1:0] ar [N];

  assign addr_a = ar[sel_a];
  assign addr_b = ar[sel_b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) ar[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (set_en && int'(set_sel) == i)             ar[i] <= set_val;
        else if (inc_a && int'(sel_a) == i && inc_b && int'(sel_b) == i) ar[i] <= ar[i] + AW'(2);
        else if ((inc_a && int'(sel_a) == i) || (inc_b && int'(sel_b) == i)) ar[i] <= ar[i] + AW'(1);
      end
    end
  end

endmodule
