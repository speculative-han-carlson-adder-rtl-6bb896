// cicska_nucleus_stage: the nucleus (largest, middle) stage of the hybrid
// carry skip adder, whose ripple block is replaced by a speculative
// Han-Carlson prefix adder.
//
// Like every other stage after the first, the prefix adder works with a zero
// carry in (concatenation), a half-adder chain adds the previous stage's
// carry (incrementation), and an AOI/OAI skip gate forms the next stage
// carry from the stage generate (the prefix adder's carry out) and the stage
// propagate (the AND of all bit propagates). The prefix adder's speculative
// outputs are used while correct = 0 and its corrected outputs while
// correct = 1; spec_err tells that the speculative ones are wrong, so the
// surrounding controller must spend a second cycle with correct = 1.
//
// Replacing the nucleus ripple block by a prefix adder follows the hybrid
// CI-CSKA scheme. Keeping the zero carry in and the incrementation block
// around the prefix adder, and the correct/spec_err interface, are this
// design's choices.
//
// Carry polarity follows the stage number as in cicska_stage. Combinational.
module cicska_nucleus_stage #(
  parameter int unsigned W           = 16,
  parameter int unsigned STAGE_NO    = 5,
  parameter int unsigned SPEC_LEVELS = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         c_in,     // previous skip carry (complemented if STAGE_NO odd)
  input  logic         correct,  // 1: use the corrected prefix tree outputs
  output logic [W-1:0] s,
  output logic         c_out,    // skip carry (complemented if STAGE_NO even)
  output logic [W-1:0] p,
  output logic         spec_err
);
  localparam bit ODD = (STAGE_NO % 2) == 1;

  logic [W-1:0] s_spec, s_exact, s0;
  logic         co_spec, co_exact, g, p_all;

  spec_han_carlson #(.N(W), .SPEC_LEVELS(SPEC_LEVELS)) u_shc (
    .a (a), .b (b), .p (p),
    .s_spec (s_spec), .co_spec (co_spec),
    .s_exact (s_exact), .co_exact (co_exact),
    .err (spec_err)
  );

  assign s0    = correct ? s_exact  : s_spec;
  assign g     = correct ? co_exact : co_spec;
  assign p_all = &p;

  cska_incrementer #(.W(W), .CI_INV(ODD)) u_inc (
    .x (s0), .ci (c_in), .s (s)
  );

  cska_skip_logic #(.OAI(ODD)) u_skip (
    .g     (ODD ? ~g     : g),
    .p     (ODD ? ~p_all : p_all),
    .c_in  (c_in),
    .c_out (c_out)
  );
endmodule
