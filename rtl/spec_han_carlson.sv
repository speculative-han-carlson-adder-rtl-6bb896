// spec_han_carlson: N-bit speculative Han-Carlson prefix adder with error
// detection and a correction network. Carry in is zero: in the carry skip
// adder this block replaces the ripple block of the nucleus stage, whose carry
// in is zero by concatenation.
//
// Structure, in the three classic prefix-adder steps:
//  1. Bit generate g = a&b and propagate p = a^b.
//  2. Carry tree. Han-Carlson places prefix cells only on odd bits: level l
//     (l = 1 .. log2 N) merges odd bit i with bit i - 2**(l-1), so after level
//     l an odd bit holds the group signals of 2**l bits. A final level gives
//     every even bit its carry from the odd bit just below it.
//     The speculative tree keeps only levels 1 .. SPEC_LEVELS and then applies
//     the final level directly: each carry is computed from a window of
//     K = 2**SPEC_LEVELS (odd bits) or K+1 (even bits) operand bits, ignoring
//     what lies further down. This is faster and right for most operands.
//     The pruned levels SPEC_LEVELS+1 .. log2 N, followed by their own final
//     level, form the correction network that gives the exact carries.
//  3. Sum bits s_i = p_i ^ c_i.
//
// Error detection: a speculative carry is wrong only where a whole window
// propagates and a carry enters it from below. Because windows of odd bits
// tile the operand in steps of K, that happens exactly when, for some odd
// bit j >= K+1, the window of j propagates (P_j) and the window just below
// generates (G_{j-K}) -- the term the first pruned level would have added.
// err is the OR of those terms, so err = 1 if and only if the speculative
// result (sum or carry out) differs from the exact one.
//
// The Han-Carlson tree and the idea of a speculative tree made by pruning
// intermediate levels, with an error flag, follow the published design. How
// many levels are pruned (SPEC_LEVELS), the exact form of the error network
// and the correction network are this design's choices.
//
// Everything is combinational; the caller decides in which clock cycle it
// samples the speculative or the corrected outputs.
module spec_han_carlson #(
  parameter int unsigned N           = 16,
  parameter int unsigned SPEC_LEVELS = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p,          // bit propagate signals
  output logic [N-1:0] s_spec,     // speculative sum
  output logic         co_spec,    // speculative carry out
  output logic [N-1:0] s_exact,    // corrected sum
  output logic         co_exact,   // corrected carry out
  output logic         err         // speculation failed
);
  localparam int unsigned L = cska_pkg::log2c(N);
  localparam int unsigned K = 1 << SPEC_LEVELS;

  if ((1 << L) != N || N < 4) begin : g_bad_n
    $error("spec_han_carlson: N must be a power of two, at least 4");
  end
  if (SPEC_LEVELS < 1 || SPEC_LEVELS > L) begin : g_bad_lv
    $error("spec_han_carlson: SPEC_LEVELS must lie in 1 .. log2(N)");
  end

  // Step 1 and the odd-bit levels of step 2.
  for (genvar l = 0; l <= L; l++) begin : lv
    logic [N-1:0] g_l, p_l;
    if (l == 0) begin : g_pre
      assign g_l = a & b;
      assign p_l = a ^ b;
    end else begin : g_tree
      for (genvar i = 0; i < N; i++) begin : g_bit
        localparam int J = i - (1 << (l - 1));
        if ((i % 2) == 1 && J >= 0) begin : g_cell
          shc_prefix_cell u_cell (
            .gi (lv[l-1].g_l[i]), .pi (lv[l-1].p_l[i]),
            .gj (lv[l-1].g_l[J]), .pj (lv[l-1].p_l[J]),
            .go (g_l[i]),         .po (p_l[i])
          );
        end else begin : g_pass
          assign g_l[i] = lv[l-1].g_l[i];
          assign p_l[i] = lv[l-1].p_l[i];
        end
      end
    end
  end

  assign p = lv[0].p_l;

  // Final level (even bits take the group of the odd bit below) for the
  // speculative tree and for the full, corrected tree. gc[i] = carry out of bit i.
  logic [N-1:0] gc_spec, gc_exact;
  for (genvar i = 0; i < N; i++) begin : g_final
    if ((i % 2) == 1) begin : g_odd
      assign gc_spec[i]  = lv[SPEC_LEVELS].g_l[i];
      assign gc_exact[i] = lv[L].g_l[i];
    end else if (i == 0) begin : g_lsb
      assign gc_spec[i]  = lv[0].g_l[0];
      assign gc_exact[i] = lv[0].g_l[0];
    end else begin : g_even
      assign gc_spec[i]  = lv[0].g_l[i] | (lv[0].p_l[i] & lv[SPEC_LEVELS].g_l[i-1]);
      assign gc_exact[i] = lv[0].g_l[i] | (lv[0].p_l[i] & lv[L].g_l[i-1]);
    end
  end

  // Step 3.
  assign s_spec   = p ^ {gc_spec[N-2:0], 1'b0};
  assign s_exact  = p ^ {gc_exact[N-2:0], 1'b0};
  assign co_spec  = gc_spec[N-1];
  assign co_exact = gc_exact[N-1];

  // Error detection network.
  logic [N-1:0] err_term;
  for (genvar j = 0; j < N; j++) begin : g_err
    if ((j % 2) == 1 && j >= K + 1) begin : g_term
      assign err_term[j] = lv[SPEC_LEVELS].p_l[j] & lv[SPEC_LEVELS].g_l[j-K];
    end else begin : g_none
      assign err_term[j] = 1'b0;
    end
  end
  assign err = |err_term;
endmodule
