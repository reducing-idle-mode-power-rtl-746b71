// simd_vreduce: the vector reduction unit (V.Reduction).
//
// Adds the L lane products into the single filter output y[n]. It is a
// balanced binary adder tree that keeps full precision (2*W + log2(L) bits)
// and saturates the total to the 32-bit data-memory word at the end; the tree
// shape and the saturation are this design's choices. L must be a power of
// two. Purely combinational.
module simd_vreduce
  import imp_pkg::*;
#(
  parameter int unsigned L  = LANES,
  parameter int unsigned W  = DW,
  parameter int unsigned OW = XW
) (
  input  logic [L-1:0][2*W-1:0] p,
  output logic [OW-1:0]         y
);

  localparam int unsigned LV = $clog2(L);
  localparam int unsigned SW = 2*W + LV;

  // t[k] holds the L >> k partial sums of tree level k.
  logic signed [SW-1:0] t [LV+1][L];
  logic signed [SW-1:0] sum;

  always_comb begin
    t = '{default: '0};
    for (int i = 0; i < L; i++) t[0][i] = SW'($signed(p[i]));
    for (int k = 1; k <= LV; k++) begin
      for (int i = 0; i < (L >> k); i++) t[k][i] = t[k-1][2*i] + t[k-1][2*i+1];
    end
    sum = t[LV][0];
  end

  localparam logic signed [SW-1:0] MAXV = SW'({1'b0, {(OW-1){1'b1}}});
  localparam logic signed [SW-1:0] MINV = -MAXV - 1;

  always_comb begin
    if (sum > MAXV)      y = MAXV[OW-1:0];
    else if (sum < MINV) y = MINV[OW-1:0];
    else                      y = sum[OW-1:0];
  end

endmodule
