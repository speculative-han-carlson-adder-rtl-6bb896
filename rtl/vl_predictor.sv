// vl_predictor: critical-path predictor of the variable-latency carry skip
// adder. It XORs the operand bits of a window in the middle of the adder to
// get their propagate signals and ANDs them. pred = 1 means every bit of the
// window propagates, so a carry from the low end could ripple and skip all
// the way to the high end: the adder's critical path may be active and the
// result needs two cycles. pred = 0 guarantees that only the shorter paths
// are active and one cycle suffices. A wider window mispredicts less often
// but leaves a longer path for the single-cycle case. The XOR/AND structure
// and its place in the middle of the adder follow the published scheme; the
// window used by the adder (the nucleus bits) is this design's choice.
// Combinational.
module vl_predictor #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,   // operand bits of the predictor window
  input  logic [W-1:0] b,
  output logic         pred
);
  assign pred = &(a ^ b);
endmodule
