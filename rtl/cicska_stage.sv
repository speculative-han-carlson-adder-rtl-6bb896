// cicska_stage: one ripple stage (stage number STAGE_NO >= 2) of the
// concatenation-incrementation carry skip adder.
//
// The stage adds its operand slice with a ripple-carry block whose carry in is
// tied to zero, so all stages compute their partial sums at the same time
// (concatenation). The carry of the previous stage is then added by a chain
// of half adders (incrementation), and the stage's skip gate forms the carry
// for the next stage from the ripple block's carry out and the product of the
// stage's propagate signals.
//
// Carry polarity follows the stage number: even stages use an AOI gate, take
// a true carry and return it complemented; odd stages use an OAI gate, take a
// complemented carry and return it true. Combinational.
module cicska_stage #(
  parameter int unsigned W        = 4,
  parameter int unsigned STAGE_NO = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         c_in,    // previous skip carry (complemented if STAGE_NO odd)
  output logic [W-1:0] s,
  output logic         c_out,   // skip carry (complemented if STAGE_NO even)
  output logic [W-1:0] p        // per-bit propagate signals
);
  localparam bit ODD = (STAGE_NO % 2) == 1;

  logic [W-1:0] s0;
  logic         g, p_all;

  cska_rca #(.W(W)) u_rca (
    .a (a), .b (b), .ci (1'b0),
    .s (s0), .co (g), .p (p), .p_all (p_all)
  );

  cska_incrementer #(.W(W), .CI_INV(ODD)) u_inc (
    .x (s0), .ci (c_in), .s (s)
  );

  // Odd stages feed the OAI gate with complemented generate and propagate.
  cska_skip_logic #(.OAI(ODD)) u_skip (
    .g     (ODD ? ~g     : g),
    .p     (ODD ? ~p_all : p_all),
    .c_in  (c_in),
    .c_out (c_out)
  );
endmodule
