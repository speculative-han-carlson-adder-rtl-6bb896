// tb_hvl_cicska: checks the combinational hybrid adder in its default 32-bit
// variable-stage-size configuration and in a fixed-stage-size one (eight
// 4-bit stages, nucleus = stage 4, 2-bit speculation windows):
//   - with correct = 1 the result equals a + b + cin for every input,
//   - with correct = 0 it equals it whenever spec_err is 0,
//   - spec_err matches the window model of the nucleus,
//   - pred is the AND of the propagates of the predictor window.
// Random, biased and directed operands (full carry chains, all-propagate).
module tb_hvl_cicska;
  import shc_model_pkg::*;

  int checks = 0, failures = 0, n_err = 0, n_pred = 0, n_err_f = 0;

  logic [31:0] a, b, s, s_f;
  logic        cin, corr, co, pred, err, co_f, pred_f, err_f;

  hvl_cicska dut (.a(a), .b(b), .cin(cin), .correct(corr),
                  .sum(s), .cout(co), .pred(pred), .spec_err(err));

  hvl_cicska #(.WIDTH(32), .NSTAGES(8), .STAGE_W('{4, 4, 4, 4, 4, 4, 4, 4}),
               .NUCLEUS_IDX(3), .SPEC_LEVELS(1), .PRED_LSB(12), .PRED_W(4)) dut_fss (
    .a(a), .b(b), .cin(cin), .correct(corr),
    .sum(s_f), .cout(co_f), .pred(pred_f), .spec_err(err_f));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 30000; n++) begin
      logic [32:0] t;
      logic        e_exp, ef_exp, p_exp, pf_exp;
      a = $urandom;
      unique case (n % 3)
        0: b = $urandom;
        1: b = ~a ^ ($urandom & $urandom & $urandom);
        default: b = ~a ^ ($urandom & $urandom & $urandom & $urandom & $urandom);
      endcase
      cin = 1'($urandom);
      if (n == 0) begin a = 32'hffff_ffff; b = 32'h0; cin = 1'b1; end
      if (n == 1) begin a = 32'h7fff_ffff; b = 32'h1; cin = 1'b0; end
      if (n == 2) begin a = 32'hffff_ffff; b = 32'hffff_ffff; cin = 1'b1; end
      if (n == 3) begin a = 32'h0; b = 32'h0; cin = 1'b0; end
      t      = 33'(a) + 33'(b) + 33'(cin);
      e_exp  = spec_fails(64'(a[25:10]), 64'(b[25:10]), 16, 8);
      ef_exp = spec_fails(64'(a[15:12]), 64'(b[15:12]), 4, 2);
      p_exp  = &(a[25:10] ^ b[25:10]);
      pf_exp = &(a[15:12] ^ b[15:12]);
      for (int k = 0; k < 2; k++) begin
        corr = k[0];
        #1;
        checks += 4;
        if (err    !== e_exp)  begin failures++; $display("FAIL err %08h %08h", a, b); end
        if (err_f  !== ef_exp) begin failures++; $display("FAIL err fss %08h %08h", a, b); end
        if (pred   !== p_exp)  begin failures++; $display("FAIL pred %08h %08h", a, b); end
        if (pred_f !== pf_exp) begin failures++; $display("FAIL pred fss %08h %08h", a, b); end
        if (corr || !e_exp) begin
          checks++;
          if ({co, s} !== t) begin
            failures++;
            $display("FAIL vss %08h+%08h+%0d corr=%0d: got %0h exp %0h", a, b, cin, corr, {co, s}, t);
          end
        end
        if (corr || !ef_exp) begin
          checks++;
          if ({co_f, s_f} !== t) begin
            failures++;
            $display("FAIL fss %08h+%08h+%0d corr=%0d: got %0h exp %0h", a, b, cin, corr, {co_f, s_f}, t);
          end
        end
      end
      if (e_exp) n_err++;
      if (p_exp) n_pred++;
      if (ef_exp) n_err_f++;
    end
    checks += 3;
    if (n_err == 0)   begin failures++; $display("FAIL no speculation error seen"); end
    if (n_pred == 0)  begin failures++; $display("FAIL predictor never fired"); end
    if (n_err_f == 0) begin failures++; $display("FAIL no fss speculation error seen"); end
    $display("errors %0d, predictions %0d, fss errors %0d", n_err, n_pred, n_err_f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
