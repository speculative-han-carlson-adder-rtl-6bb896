// cska_rca: W-bit ripple-carry adder block, a chain of full adders, as used in
// every stage of the carry skip adder. Besides sum and carry out it returns
// the per-bit propagate signals and their product (all bits in propagate
// mode), which the skip logic and the predictor need.
//
// Combinational. In the CI-CSKA only the first stage drives ci; all other
// stages tie it to zero (concatenation) so that their ripple chains start
// together. The block itself is the textbook ripple chain the scheme calls
// for; the extra propagate outputs are this design's way of sharing them.
module cska_rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co,
  output logic [W-1:0] p,
  output logic         p_all
);
  logic [W:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_fa
    cska_full_adder u_fa (
      .a (a[i]), .b (b[i]), .ci (c[i]),
      .s (s[i]), .co (c[i+1]), .p (p[i])
    );
  end

  assign co    = c[W];
  assign p_all = &p;
endmodule
