// hvl_cicska: hybrid variable-latency concatenation-incrementation carry skip
// adder (CI-CSKA), combinational core.
//
// The operands are cut into NSTAGES stages of STAGE_W[j] bits, least
// significant first. The first stage is a plain ripple-carry block that takes
// the adder's carry in. Every later stage adds its slice with carry in zero,
// so all stages work in parallel, then a half-adder chain adds the carry of
// the previous stage, and an AOI (even stage numbers) or OAI (odd stage
// numbers) gate forms the carry for the next stage. The skip carry therefore
// alternates in polarity along the chain; the adder's carry out is restored
// to true polarity at the end.
//
// Stage NUCLEUS_IDX, the largest, holds a speculative Han-Carlson prefix adder
// instead of a ripple block. Two flags tell the controller that one cycle is
// not enough:
//   pred      the predictor window (PRED_W bits from PRED_LSB) propagates
//             entirely, so the long carry path may be active;
//   spec_err  the nucleus prefix adder speculated wrongly.
// With correct = 1 the nucleus uses its corrected carries and the outputs are
// exact for all operands; with correct = 0 they are exact whenever
// spec_err = 0.
//
// The 32-bit width and the stage structure follow the published design; the
// stage sizes {1,2,3,4,16,3,2,1} and the predictor window are this design's
// choices (see cska_pkg). Equal STAGE_W values give the fixed-stage-size
// variant of the same adder.
module hvl_cicska #(
  parameter int unsigned WIDTH       = cska_pkg::ADDER_W,
  parameter int unsigned NSTAGES     = cska_pkg::NSTAGES,
  parameter int unsigned STAGE_W [NSTAGES] = cska_pkg::STAGE_W_DEFAULT,
  parameter int unsigned NUCLEUS_IDX = cska_pkg::NUCLEUS_IDX,
  parameter int unsigned SPEC_LEVELS = cska_pkg::SPEC_LEVELS,
  parameter int unsigned PRED_LSB    = cska_pkg::PRED_LSB,
  parameter int unsigned PRED_W      = cska_pkg::PRED_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             correct,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             pred,
  output logic             spec_err
);
  // Least significant bit of stage j.
  function automatic int unsigned lsb_of(int unsigned j);
    int unsigned s = 0;
    for (int unsigned k = 0; k < j; k++) s += STAGE_W[k];
    return s;
  endfunction

  if (lsb_of(NSTAGES) != WIDTH) begin : g_bad_sizes
    $error("hvl_cicska: stage sizes do not add up to WIDTH");
  end
  if (NUCLEUS_IDX == 0 || NUCLEUS_IDX >= NSTAGES) begin : g_bad_nucleus
    $error("hvl_cicska: the nucleus must be a stage after the first");
  end
  if (PRED_LSB + PRED_W > WIDTH || PRED_W == 0) begin : g_bad_pred
    $error("hvl_cicska: predictor window outside the operands");
  end

  // c[j] = skip carry out of stage j (stage number j+1); complemented when
  // the stage number is even.
  logic [NSTAGES-1:0] c;
  logic               nuc_err;

  for (genvar j = 0; j < NSTAGES; j++) begin : g_stage
    localparam int unsigned LSB = lsb_of(j);
    localparam int unsigned W   = STAGE_W[j];
    logic [W-1:0] p_unused;

    if (j == 0) begin : g_first
      logic p_all_unused;
      cska_rca #(.W(W)) u_rca (
        .a (a[LSB +: W]), .b (b[LSB +: W]), .ci (cin),
        .s (sum[LSB +: W]), .co (c[0]), .p (p_unused), .p_all (p_all_unused)
      );
    end else if (j == NUCLEUS_IDX) begin : g_nucleus
      cicska_nucleus_stage #(.W(W), .STAGE_NO(j + 1), .SPEC_LEVELS(SPEC_LEVELS)) u_nuc (
        .a (a[LSB +: W]), .b (b[LSB +: W]), .c_in (c[j-1]), .correct (correct),
        .s (sum[LSB +: W]), .c_out (c[j]), .p (p_unused), .spec_err (nuc_err)
      );
    end else begin : g_ci
      cicska_stage #(.W(W), .STAGE_NO(j + 1)) u_stage (
        .a (a[LSB +: W]), .b (b[LSB +: W]), .c_in (c[j-1]),
        .s (sum[LSB +: W]), .c_out (c[j]), .p (p_unused)
      );
    end
  end

  assign cout     = (NSTAGES % 2 == 0) ? ~c[NSTAGES-1] : c[NSTAGES-1];
  assign spec_err = nuc_err;

  vl_predictor #(.W(PRED_W)) u_pred (
    .a (a[PRED_LSB +: PRED_W]), .b (b[PRED_LSB +: PRED_W]), .pred (pred)
  );
endmodule
