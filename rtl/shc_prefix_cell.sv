// shc_prefix_cell: the "black" cell of a parallel prefix carry tree. It merges
// the group generate/propagate of a more significant span (gi, pi) with that
// of the adjacent less significant span (gj, pj), using the associative
// prefix operator:
//   go = gi | (pi & gj)
//   po = pi & pj
// Combinational.
module shc_prefix_cell (
  input  logic gi,
  input  logic pi,
  input  logic gj,
  input  logic pj,
  output logic go,
  output logic po
);
  assign go = gi | (pi & gj);
  assign po = pi & pj;
endmodule
