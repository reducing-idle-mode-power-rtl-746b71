// loop_ctrl: hardware loop counter of the control unit.
//
// The document folds the loop bookkeeping of the FIR routine into a
// "decrement and jump if not zero" (djnz) done by a decrementing counter with
// zero detection. `load` (the LOOP instruction) sets the counter to `count`
// and the loop start to `start_pc` (the address after LOOP). Each time an
// instruction carrying the djnz flag retires, `djnz` is high: the counter is
// decremented and, when the decremented value is not zero, `take` asks the
// control unit to continue at `target`. A count of N therefore runs the loop
// body N times; a count of 0 behaves like 1. One loop level is provided
// (this design's choice). `take` is combinational from `djnz` and the counter.
module loop_ctrl
  import imp_pkg::*;
#(
  parameter int unsigned W = CW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [W-1:0]  count,
  input  logic [AW-1:0] start_pc,
  input  logic          djnz,
  output logic          take,
  output logic [AW-1:0] target,
  output logic [W-1:0]  remaining
);

  logic [W-1:0] lc;
  logic [W-1:0] dec;

  assign dec       = (lc == '0) ? '0 : lc - W'(1);
  assign take      = djnz && (dec != '0);
  assign remaining = lc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lc <= '0; target <= '0;
    end else if (load) begin
      lc <= count; target <= start_pc;
    end else if (djnz) begin
      lc <= dec;
    end
  end

endmodule
