// simd_vreg: the two vector registers of the direct-form SIMD datapath.
//
// VR1 is the delay line of the FIR input x[n]; VR2 holds the coefficients.
// Both are loaded the way the document's shift.v instruction loads VR1: one
// new sample per cycle from data memory, pushed in while every lane moves one
// place. Lane i takes lane i+1 and the new sample enters lane LANES-1, so
// after a shift VR1 lane i holds x[n+i], which matches y[n] = sum c_i*x[i+n]
// when VR2 lane i holds c_i (the lane order is this design's choice).
// vr1_next is VR1 as it will be after this cycle's shift, so the multiplier
// can be cascaded straight behind the shift in the same pipeline stage.
// Reset clears both registers.
module simd_vreg
  import imp_pkg::*;
#(
  parameter int unsigned L = LANES,
  parameter int unsigned W = DW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sh1,
  input  logic                sh2,
  input  logic [W-1:0]        din,
  output logic [L-1:0][W-1:0] vr1,
  output logic [L-1:0][W-1:0] vr1_next,
  output logic [L-1:0][W-1:0] vr2
);

  logic [L-1:0][W-1:0] vr2_next;

  assign vr1_next = sh1 ? {din, vr1[L-1:1]} : vr1;
  assign vr2_next = sh2 ? {din, vr2[L-1:1]} : vr2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vr1 <= '0;
      vr2 <= '0;
    end else begin
      vr1 <= vr1_next;
      vr2 <= vr2_next;
    end
  end

endmodule
