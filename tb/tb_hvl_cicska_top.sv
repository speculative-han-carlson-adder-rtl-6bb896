// tb_hvl_cicska_top: end-to-end test of the registered 32-bit variable-latency
// adder at its default parameters.
//
// A stream of additions with random gaps is fed through the valid-ready
// input. Every result is compared with a + b + cin, and its latency with the
// expected one: the result register is loaded 1 clock edge after acceptance
// when the operation needs one cycle and 2 edges after when it needs two. The
// testbench decides independently which operations need two cycles: those
// whose predictor window (bits 10..25) propagates entirely, and those for
// which the nucleus speculation (8-bit carry windows over bits 10..25) is
// wrong. The status flags must agree.
//
// Mechanisms counted, each of which must occur: single-cycle operations,
// two-cycle operations caused by the predictor and by a speculation error
// (never both: a nucleus that propagates on every bit generates no carry, so
// its speculation cannot fail), back-to-back issue, stalled requests, full carry
// propagation from bit 0 to the carry out, and predictor mispredictions
// (a second cycle spent although no carry entered the predictor window).
// The stream starts with the operands 85218 + 75235.
module tb_hvl_cicska_top;
  import shc_model_pkg::*;

  localparam int NOPS = 20000;

  int checks = 0, failures = 0;
  int n_fast = 0, n_pred_only = 0, n_err_only = 0, n_both = 0;
  int n_b2b = 0, n_stall = 0, n_full_chain = 0, n_done = 0;
  int n_mispredict = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_ready, cin = 1'b0;
  logic [31:0] a = '0, b = '0, sum;
  logic        out_valid, cout, out_slow, out_pred, out_spec_err;

  hvl_cicska_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .cin(cin), .out_valid(out_valid), .sum(sum), .cout(cout),
    .out_slow(out_slow), .out_pred(out_pred), .out_spec_err(out_spec_err));

  always #5 clk = ~clk;

  typedef struct {
    logic [32:0] total;
    logic        pred;
    logic        err;
    int          accept_edge;
  } exp_t;
  exp_t q[$];

  int edge_no = 0;
  always @(posedge clk) edge_no++;

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_operands(int n);
    int unsigned sel;
    a   = $urandom;
    sel = $urandom % 4;
    unique case (sel)
      0, 1: b = $urandom;
      2:    b = ~a ^ ($urandom & $urandom & $urandom);
      default: b = ~a ^ ($urandom & $urandom & $urandom & $urandom & $urandom);
    endcase
    cin = 1'($urandom);
    if (n == 0) begin a = 32'd85218; b = 32'd75235; cin = 1'b0; end
    if (n % 1000 == 7) begin a = 32'hffff_ffff; b = 32'h0; cin = 1'b1; end
  endtask

  initial begin
    int   issued = 0, last_accept = -10;
    logic accepted = 1'b0;   // this cycle's request is taken at the coming edge
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_done < NOPS) begin
      @(negedge clk);
      // Completed result?
      if (out_valid) begin
        exp_t e;
        int   lat;
        if (q.size() == 0) begin
          failures++; $display("FAIL result with nothing outstanding");
        end else begin
          e   = q.pop_front();
          lat = (e.pred || e.err) ? 2 : 1;
          checks += 5;
          if ({cout, sum} !== e.total) begin
            failures++; $display("FAIL sum: got %0h expected %0h", {cout, sum}, e.total);
          end
          if (edge_no - e.accept_edge !== lat) begin
            failures++; $display("FAIL latency %0d expected %0d", edge_no - e.accept_edge, lat);
          end
          if (out_slow !== (lat == 2))  begin failures++; $display("FAIL out_slow"); end
          if (out_pred !== e.pred)      begin failures++; $display("FAIL out_pred"); end
          if (out_spec_err !== e.err)   begin failures++; $display("FAIL out_spec_err"); end
          if (n_done == 0) begin
            checks++;
            if (sum !== 32'd160453) begin failures++; $display("FAIL 85218+75235 = %0d", sum); end
          end
          n_done++;
          if (!e.pred && !e.err) n_fast++;
          else if (e.pred && !e.err) n_pred_only++;
          else if (!e.pred && e.err) n_err_only++;
          else n_both++;
        end
      end
      // Request for this cycle: a pending one is held unchanged.
      if (accepted || !in_valid) begin
        if (issued < NOPS) begin
          in_valid = ($urandom % 5) != 0;
          if (in_valid) new_operands(issued);
        end else begin
          in_valid = 1'b0;
        end
      end
      #1;
      accepted = in_valid && in_ready;
      if (accepted) begin
        exp_t e;
        e.total = 33'(a) + 33'(b) + 33'(cin);
        e.pred  = &(a[25:10] ^ b[25:10]);
        e.err   = spec_fails(64'(a[25:10]), 64'(b[25:10]), 16, 8);
        e.accept_edge = edge_no + 1;
        if ((&(a ^ b)) && cin) n_full_chain++;
        // Predictor fired although no carry enters the window from bit 9:
        // the second cycle was not needed (a misprediction).
        if (e.pred && !(({1'b0, a[9:0]} + {1'b0, b[9:0]} + 11'(cin)) >> 10)) n_mispredict++;
        if (e.accept_edge == last_accept + 1) n_b2b++;
        last_accept = e.accept_edge;
        q.push_back(e);
        issued++;
      end else if (in_valid) begin
        n_stall++;
      end
    end
    repeat (3) @(negedge clk);
    checks += 8;
    if (q.size() != 0)     begin failures++; $display("FAIL %0d results missing", q.size()); end
    if (out_valid)         begin failures++; $display("FAIL spurious result"); end
    if (n_fast == 0)       begin failures++; $display("FAIL no single-cycle operation"); end
    if (n_pred_only == 0)  begin failures++; $display("FAIL predictor never caused a second cycle"); end
    if (n_err_only == 0)   begin failures++; $display("FAIL speculation error never caused a second cycle"); end
    // With the predictor window equal to the nucleus, a fully propagating
    // nucleus holds no generate bit, so its speculation cannot fail.
    if (n_both != 0)       begin failures++; $display("FAIL predictor and speculation error together"); end
    if (n_b2b == 0)        begin failures++; $display("FAIL no back-to-back issue"); end
    if (n_stall == 0)      begin failures++; $display("FAIL no stalled request"); end
    checks += 2;
    if (n_mispredict == 0) begin failures++; $display("FAIL no predictor misprediction seen"); end
    if (n_full_chain == 0) begin failures++; $display("FAIL no full carry chain"); end
    $display("ops %0d: fast %0d, predictor only %0d, speculation error only %0d, both %0d",
             n_done, n_fast, n_pred_only, n_err_only, n_both);
    $display("back-to-back %0d, stalls %0d, full carry chains %0d, mispredictions %0d",
             n_b2b, n_stall, n_full_chain, n_mispredict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
