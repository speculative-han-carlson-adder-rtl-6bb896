// cska_pkg: constants shared by the concatenation-incrementation carry skip
// adder (CI-CSKA) and its hybrid variable-latency version.
//
// The 32-bit operand width is the size the design is built for. The stage
// sizes are this design's own variable-stage-size choice: a single-bit first
// stage, growing stages, one large "nucleus" stage in the middle that is built
// as a speculative Han-Carlson prefix adder, and shrinking stages towards the
// most significant end. The nucleus is a power of two wide so that the prefix
// tree is regular.
package cska_pkg;

  // Operand width of the adder.
  localparam int unsigned ADDER_W = 32;

  // Number of skip stages (Q) and their sizes M_j, least significant first.
  localparam int unsigned NSTAGES = 8;
  localparam int unsigned STAGE_W_DEFAULT [NSTAGES] = '{1, 2, 3, 4, 16, 3, 2, 1};

  // Index (0-based) of the nucleus stage that holds the prefix adder.
  localparam int unsigned NUCLEUS_IDX = 4;

  // Number of Kogge-Stone-like levels kept in the speculative Han-Carlson
  // tree; the levels above it are pruned and only used for correction.
  // With a 16-bit nucleus (4 levels) one level is pruned: carries are then
  // speculated from windows of 2**3 = 8 bits.
  localparam int unsigned SPEC_LEVELS = 3;

  // Predictor window: the propagate signals of the nucleus bits.
  localparam int unsigned PRED_LSB = 10;
  localparam int unsigned PRED_W   = 16;

  // Clog2 usable in constant expressions.
  function automatic int unsigned log2c(int unsigned n);
    int unsigned r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

endpackage
