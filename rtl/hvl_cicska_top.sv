// hvl_cicska_top: registered 32-bit variable-latency carry skip adder with a
// speculative Han-Carlson prefix adder in its nucleus stage.
//
// Datapath: operand register -> hvl_cicska (combinational) -> result
// register. The adder is meant to be clocked at the delay of its longest
// off-critical path. vl_controller lets each operation spend one cycle in the
// adder, or two when the predictor says the critical path may be active or
// the nucleus prefix adder reports a speculation error; in the second cycle
// the nucleus uses its corrected carries.
//
// Timing, counted in rising clock edges from the edge that accepts an
// operation (in_valid && in_ready): the result is captured 1 edge later for a
// single-cycle operation and 2 edges later for a two-cycle one, and out_valid
// is high for the one cycle after that capture. Fast operations can be issued
// back to back, one per clock. There is no output back-pressure: out_valid
// is a one-cycle strobe. out_slow, out_pred and out_spec_err report why an
// operation took two cycles.
//
// Reset is asynchronous, active low; it clears the controller and the valid
// flag and zeroes the registers. The operand and result registers and the
// port list are this design's choices; the adder inside follows the
// published hybrid scheme.
module hvl_cicska_top #(
  parameter int unsigned WIDTH       = cska_pkg::ADDER_W,
  parameter int unsigned NSTAGES     = cska_pkg::NSTAGES,
  parameter int unsigned STAGE_W [NSTAGES] = cska_pkg::STAGE_W_DEFAULT,
  parameter int unsigned NUCLEUS_IDX = cska_pkg::NUCLEUS_IDX,
  parameter int unsigned SPEC_LEVELS = cska_pkg::SPEC_LEVELS,
  parameter int unsigned PRED_LSB    = cska_pkg::PRED_LSB,
  parameter int unsigned PRED_W      = cska_pkg::PRED_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             out_slow,      // operation took two cycles
  output logic             out_pred,      // predictor fired for it
  output logic             out_spec_err   // nucleus speculation failed for it
);
  logic [WIDTH-1:0] a_q, b_q, sum_d;
  logic             cin_q, cout_d, pred, spec_err;
  logic             load, correct, res_load, second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= 1'b0;
    end else if (load) begin
      a_q   <= a;
      b_q   <= b;
      cin_q <= cin;
    end
  end

  hvl_cicska #(
    .WIDTH (WIDTH), .NSTAGES (NSTAGES), .STAGE_W (STAGE_W),
    .NUCLEUS_IDX (NUCLEUS_IDX), .SPEC_LEVELS (SPEC_LEVELS),
    .PRED_LSB (PRED_LSB), .PRED_W (PRED_W)
  ) u_adder (
    .a (a_q), .b (b_q), .cin (cin_q), .correct (correct),
    .sum (sum_d), .cout (cout_d), .pred (pred), .spec_err (spec_err)
  );

  vl_controller u_ctrl (
    .clk (clk), .rst_n (rst_n),
    .in_valid (in_valid), .in_ready (in_ready),
    .slow (pred | spec_err),
    .load (load), .correct (correct), .res_load (res_load), .second (second)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      sum          <= '0;
      cout         <= 1'b0;
      out_slow     <= 1'b0;
      out_pred     <= 1'b0;
      out_spec_err <= 1'b0;
    end else begin
      out_valid <= res_load;
      if (res_load) begin
        sum          <= sum_d;
        cout         <= cout_d;
        out_slow     <= second;
        out_pred     <= pred;
        out_spec_err <= spec_err;
      end
    end
  end

  // Handshake rule for the producer: a pending request is held, unchanged.
  a_hold_request: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> (in_valid && $stable({a, b, cin})));
endmodule
