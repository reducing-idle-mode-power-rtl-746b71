// scalar_div: iterative signed divider of the scalar unit.
//
// The document lists division among the scalar unit's operations without
// saying how it is done; this is the simplest hardware for it, a radix-2
// restoring divider that produces one quotient bit per cycle. `start` (held
// high by a DIV or REM waiting in the execute stage) captures the operands
// while the unit is idle; W cycles later `done` is high for one cycle with the
// quotient q and remainder r, and the unit is idle again. The divide
// instruction is held for W+2 cycles in all. Signed semantics: the quotient
// is truncated toward zero and the remainder takes the dividend's sign.
// Division by zero gives q = -1 and r = a. The latency and the zero rule are
// this design's choices.
module scalar_div
  import imp_pkg::*;
#(
  parameter int unsigned W = XW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] q,
  output logic [W-1:0] r
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;

  state_t                 state;
  logic [$clog2(W)-1:0]   cnt;
  logic [W-1:0]           quo, den, a_q;
  logic [W-1:0]           rem;
  logic                   neg_q, neg_r, zero;
  logic [W:0]             trial;
  logic [W-1:0]           qq, rr;

  assign trial = {rem, quo[W-1]} - {1'b0, den};
  assign busy  = state != S_IDLE;
  assign done  = state == S_DONE;

  assign qq = neg_q ? -quo : quo;
  assign rr = neg_r ? -rem : rem;
  assign q  = zero ? '1  : qq;
  assign r  = zero ? a_q : rr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; quo <= '0; den <= '0; rem <= '0; a_q <= '0;
      neg_q <= 1'b0; neg_r <= 1'b0; zero <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          quo   <= a[W-1] ? -a : a;
          den   <= b[W-1] ? -b : b;
          rem   <= '0;
          a_q   <= a;
          neg_q <= a[W-1] ^ b[W-1];
          neg_r <= a[W-1];
          zero  <= b == '0;
          cnt   <= '1;
          state <= S_RUN;
        end
        S_RUN: begin
          if (!trial[W]) begin
            rem <= trial[W-1:0];
            quo <= {quo[W-2:0], 1'b1};
          end else begin
            rem <= {rem[W-2:0], quo[W-1]};
            quo <= {quo[W-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
          if (cnt == '0) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
