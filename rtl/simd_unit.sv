// simd_unit: the direct-form SIMD datapath with cascaded arithmetic units.
//
// The document's SIMD unit computes one FIR output per cycle with its three
// pipeline stages read, execution-1 and execution-2, and chains shift,
// multiply and reduction without a register file or vector accumulator in
// between (its Figure 5(d): reduction.v (AR2++) <- mul.v VR2, shift.v VR1,(AR1++)).
// Here:
//   read         the cycle `issue` is high: the control unit sends the read of
//                x to data memory and hands over the operation and the output
//                address (waddr, from AR2);
//   execution-1  the sample arrives on mem_rdata; it is shifted into VR1 (or
//                VR2), and for V_FIR all lanes multiply or complement the
//                shifted VR1 with VR2 into the product register;
//   execution-2  the adder tree reduces the products to y and wreq writes y
//                to data memory at waddr.
// A V_FIR issued in cycle t writes its result at the clock edge ending cycle
// t+2; one V_FIR may issue every cycle. V_SH1 and V_SH2 only shift (to fill the
// delay line or load coefficients) and produce no write. There are no data
// dependences inside the pipe, so it needs no forwarding and never stalls;
// the control unit keeps scalar memory traffic away from results still in
// flight using `busy`. Samples are the low DW bits of the memory word.
module simd_unit
  import imp_pkg::*;
#(
  parameter int unsigned L = LANES,
  parameter int unsigned W = DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          issue,
  input  vop_t          op,
  input  logic          comp,
  input  logic [AW-1:0] waddr,
  input  logic [XW-1:0] mem_rdata,
  output dmem_req_t     wreq,
  output logic          busy
);

  // execution-1 stage registers
  logic          e1_v, e1_comp;
  vop_t          e1_op;
  logic [AW-1:0] e1_waddr;
  // execution-2 stage registers
  logic          e2_v;
  logic [AW-1:0] e2_waddr;
  logic [L-1:0][2*W-1:0] e2_p;

  logic [L-1:0][W-1:0]   vr1, vr1_next, vr2;
  logic [L-1:0][2*W-1:0] p;
  logic [XW-1:0]         y;
  logic                  sh1, sh2, fir1;

  assign sh1  = e1_v && (e1_op == V_SH1 || e1_op == V_FIR);
  assign sh2  = e1_v && (e1_op == V_SH2);
  assign fir1 = e1_v && (e1_op == V_FIR);

  simd_vreg #(.L(L), .W(W)) u_vreg (
    .clk, .rst_n, .sh1, .sh2, .din(mem_rdata[W-1:0]), .vr1, .vr1_next, .vr2
  );

  simd_vmult #(.L(L), .W(W)) u_vmult (
    .x(vr1_next), .c(vr2), .comp(e1_comp), .p
  );

  simd_vreduce #(.L(L), .W(W), .OW(XW)) u_vreduce (
    .p(e2_p), .y
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_v <= 1'b0; e1_op <= V_SH1; e1_comp <= 1'b0; e1_waddr <= '0;
      e2_v <= 1'b0; e2_waddr <= '0; e2_p <= '0;
    end else begin
      e1_v <= issue;
      if (issue) begin
        e1_op <= op; e1_comp <= comp; e1_waddr <= waddr;
      end
      e2_v <= fir1;
      if (fir1) begin
        e2_p <= p; e2_waddr <= e1_waddr;
      end
    end
  end

  assign wreq = '{en: e2_v, we: e2_v, addr: e2_waddr, wdata: y};
  assign busy = e1_v || e2_v;

endmodule
