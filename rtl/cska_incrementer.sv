// cska_incrementer: W-bit incrementation block of the CI-CSKA, a chain of half
// adders that adds the carry coming from the previous stage's skip logic to
// the partial sum that the stage computed with a zero carry in.
//
// The skip carries alternate in polarity from stage to stage (AOI and OAI
// gates invert). CI_INV = 1 means the incoming carry is complemented; the
// first half adder then absorbs the inversion. As in the original scheme, the
// carry out of the half-adder chain is not produced: the stage carry comes
// from the skip logic instead. The half-adder chain and the dropped carry are
// part of the published scheme; folding the polarity into the first half
// adder is this design's choice. Combinational.
module cska_incrementer #(
  parameter int unsigned W      = 4,
  parameter bit          CI_INV = 1'b0
) (
  input  logic [W-1:0] x,     // partial sum from the stage adder (carry in 0)
  input  logic         ci,    // skip carry of the previous stage, polarity CI_INV
  output logic [W-1:0] s
);
  logic [W-1:0] c;            // half-adder chain carries, true polarity
  assign c[0] = CI_INV ? ~ci : ci;

  for (genvar i = 0; i < W; i++) begin : g_ha
    assign s[i]   = x[i] ^ c[i];
    if (i < W - 1) begin : g_carry
      assign c[i+1] = x[i] & c[i];
    end
  end
endmodule
