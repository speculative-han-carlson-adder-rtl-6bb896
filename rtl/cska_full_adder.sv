// cska_full_adder: one-bit full adder, the cell the ripple-carry blocks of the
// carry skip adder are chained from. Purely combinational:
//   s    = a ^ b ^ ci
//   co   = a&b | ci&(a^b)
//   p    = a ^ b   (propagate, also used by the skip logic)
module cska_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co,
  output logic p
);
  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = (a & b) | (ci & p);
  end
endmodule
