// vl_controller: latency controller of the variable-latency adder.
//
// The adder's operand register holds one operation at a time. In the first
// cycle of an operation the controller looks at the adder's "slow" flag (the
// critical-path predictor or the speculation error of the nucleus prefix
// adder). If it is clear the result is taken at the end of that cycle;
// otherwise the operation stays one more cycle, with the adder told to use
// its corrected carries, and the result is taken at the end of the second
// cycle. A new operation is accepted in the same cycle the current one
// completes, so back-to-back fast operations run at one per clock.
//
// Interface: in_valid/in_ready is a valid-ready handshake; once in_valid is
// high it must stay high, with stable data, until in_ready. load strobes the
// operand register, res_load the result register, correct selects the
// corrected carries, and second marks the second cycle of a slow operation.
// Reset is asynchronous and active low and leaves the controller idle.
// The one-or-two-cycle rule follows the variable-latency scheme; the
// handshake, back-to-back issue and reset are this design's choices.
module vl_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic slow,       // current operation needs two cycles
  output logic load,       // capture new operands this cycle
  output logic correct,    // adder uses the corrected carries
  output logic res_load,   // capture the adder result this cycle
  output logic second      // current cycle is the second of a slow operation
);
  typedef enum logic [1:0] {
    IDLE   = 2'd0,   // no operation held
    FIRST  = 2'd1,   // first cycle of an operation
    SECOND = 2'd2    // second (correction) cycle of a slow operation
  } state_t;

  state_t state, state_d;

  always_comb begin
    res_load = (state == SECOND) || (state == FIRST && !slow);
    in_ready = (state == IDLE) || res_load;
    load     = in_valid && in_ready;
    correct  = (state == SECOND);
    second   = (state == SECOND);

    unique case (state)
      IDLE:    state_d = load ? FIRST : IDLE;
      FIRST:   state_d = !slow ? (load ? FIRST : IDLE) : SECOND;
      SECOND:  state_d = load ? FIRST : IDLE;
      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= state_d;
  end

  // A slow operation always completes in its second cycle.
  a_second_done: assert property (@(posedge clk) disable iff (!rst_n)
    (state == SECOND) |-> res_load);
  // A slow first cycle never completes and never takes a new operation.
  a_slow_holds: assert property (@(posedge clk) disable iff (!rst_n)
    (state == FIRST && slow) |-> (!res_load && !in_ready));
endmodule
