// cska_skip_logic: skip logic of one CI-CSKA stage, built as a single
// inverting compound gate instead of a 2:1 multiplexer. The stage carry is
//   C_j = G_j | (P_j & C_{j-1})
// where G_j is the carry out of the stage's own adder (computed with carry in
// zero) and P_j is the product of the stage's propagate signals.
//
// Because the gate inverts, polarity alternates along the chain:
//   OAI = 0 : AND-OR-INVERT, true inputs,        output ~C_j
//   OAI = 1 : OR-AND-INVERT, complemented inputs, output  C_j
//             C_j = ~( ~G_j & (~P_j | ~C_{j-1}) )
// The complemented G and P come from the stage (the inversion is absorbed in
// the gates that produce them). The use of AOI/OAI gates and the alternating
// polarity follow the CI-CSKA scheme; the gate equation is the standard skip
// function for a stage whose adder starts from carry zero. Combinational.
module cska_skip_logic #(
  parameter bit OAI = 1'b0
) (
  input  logic g,        // stage generate, polarity OAI ? complemented : true
  input  logic p,        // stage propagate, same polarity as g
  input  logic c_in,     // previous skip carry, same polarity as g
  output logic c_out     // skip carry, polarity OAI ? true : complemented
);
  if (OAI) begin : g_oai
    assign c_out = ~(g & (p | c_in));
  end else begin : g_aoi
    assign c_out = ~(g | (p & c_in));
  end
endmodule
