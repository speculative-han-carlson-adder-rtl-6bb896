// tb_cicska_nucleus_stage: checks the nucleus stage (16-bit, odd stage number,
// and 8-bit, even stage number) for random operands and incoming carries:
//   - with correct = 1 the stage sum and skip carry equal a+b+c,
//   - with correct = 0 they do too whenever spec_err is 0,
//   - spec_err matches the window model of the prefix adder.
module tb_cicska_nucleus_stage;
  import shc_model_pkg::*;

  int checks = 0, failures = 0, n_err = 0;

  logic [15:0] a, b, s, p;     logic c, corr, co, err;
  logic [7:0]  a8, b8, s8, p8; logic co8, err8;

  cicska_nucleus_stage dut (.a(a), .b(b), .c_in(~c), .correct(corr),
                            .s(s), .c_out(co), .p(p), .spec_err(err));
  cicska_nucleus_stage #(.W(8), .STAGE_NO(4), .SPEC_LEVELS(2)) dut8 (
    .a(a8), .b(b8), .c_in(c), .correct(corr), .s(s8), .c_out(co8), .p(p8), .spec_err(err8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [16:0] t;
      logic [8:0]  t8;
      logic        e_exp, e8_exp;
      a  = 16'($urandom);
      b  = (n % 2) ? ~a ^ 16'($urandom & $urandom & $urandom) : 16'($urandom);
      a8 = 8'($urandom);
      b8 = (n % 2) ? ~a8 ^ 8'($urandom & $urandom) : 8'($urandom);
      c  = 1'($urandom);
      t  = 17'(a) + 17'(b) + 17'(c);
      t8 = 9'(a8) + 9'(b8) + 9'(c);
      e_exp  = spec_fails(64'(a), 64'(b), 16, 8);
      e8_exp = spec_fails(64'(a8), 64'(b8), 8, 4);
      for (int k = 0; k < 2; k++) begin
        corr = k[0];
        #1;
        checks += 2;
        if (err  !== e_exp)  begin failures++; $display("FAIL err16 %04h %04h", a, b); end
        if (err8 !== e8_exp) begin failures++; $display("FAIL err8 %02h %02h", a8, b8); end
        if (corr || !e_exp) begin
          checks += 2;
          // Stage 5 (odd) returns a true carry.
          if ({co, s} !== t) begin failures++; $display("FAIL sum16 %04h+%04h+%0d corr=%0d", a, b, c, corr); end
          if (p !== (a ^ b)) begin failures++; $display("FAIL p16"); end
        end
        if (corr || !e8_exp) begin
          checks++;
          // Stage 4 (even) returns a complemented carry.
          if ({~co8, s8} !== t8) begin failures++; $display("FAIL sum8 %02h+%02h+%0d corr=%0d", a8, b8, c, corr); end
        end
      end
      if (e_exp) n_err++;
    end
    checks++;
    if (n_err == 0) begin failures++; $display("FAIL speculation never failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
