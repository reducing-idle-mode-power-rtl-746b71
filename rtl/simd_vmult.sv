// simd_vmult: the per-lane multiplier / complementer (V.Mult / V.Comp).
//
// For pulse shaping each lane multiplies its input sample by its coefficient,
// c_i * x[i+n] of the FIR sum. For matched filtering with a synchronisation
// code of +1/-1 chips the document replaces the multiply by a conditional
// complement; with comp=1 a lane passes x when its coefficient is
// non-negative and -x when it is negative (sign bit of c set), so the
// multipliers can stay idle. Samples and coefficients are signed two's
// complement (this design's choice). Purely combinational; the products are
// 2*W bits wide and exact.
module simd_vmult
  import imp_pkg::*;
#(
  parameter int unsigned L = LANES,
  parameter int unsigned W = DW
) (
  input  logic [L-1:0][W-1:0]   x,
  input  logic [L-1:0][W-1:0]   c,
  input  logic                  comp,
  output logic [L-1:0][2*W-1:0] p
);

  for (genvar i = 0; i < L; i++) begin : g_lane
    logic signed [W-1:0]   xs, cs;
    logic signed [2*W-1:0] xe;
    assign xs = x[i];
    assign cs = c[i];
    assign xe = (2*W)'(xs);
    always_comb begin
      if (comp) p[i] = cs[W-1] ? -xe : xe;
      else      p[i] = xs * cs;
    end
  end

endmodule
