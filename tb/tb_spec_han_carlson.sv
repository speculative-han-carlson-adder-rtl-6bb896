// tb_spec_han_carlson: checks the speculative Han-Carlson adder at three
// sizes (16 bits with 8-bit windows, 8 bits with 4-bit windows, 4 bits with
// 2-bit windows) against the window model and exact addition:
//   - the corrected outputs equal a + b,
//   - the speculative outputs equal the window model,
//   - err is 1 exactly when the speculative result is wrong.
// Operands are random, partly biased towards long propagate runs so that
// speculation fails often; both outcomes must occur.
module tb_spec_han_carlson;
  import shc_model_pkg::*;

  int checks = 0, failures = 0, n_err = 0, n_ok = 0;

  logic [15:0] a16, b16, p16, ss16, se16;  logic cs16, ce16, e16;
  logic [7:0]  a8,  b8,  p8,  ss8,  se8;   logic cs8,  ce8,  e8;
  logic [3:0]  a4,  b4,  p4,  ss4,  se4;   logic cs4,  ce4,  e4;

  spec_han_carlson dut16 (.a(a16), .b(b16), .p(p16), .s_spec(ss16), .co_spec(cs16),
                          .s_exact(se16), .co_exact(ce16), .err(e16));
  spec_han_carlson #(.N(8), .SPEC_LEVELS(2)) dut8 (.a(a8), .b(b8), .p(p8), .s_spec(ss8),
                          .co_spec(cs8), .s_exact(se8), .co_exact(ce8), .err(e8));
  spec_han_carlson #(.N(4), .SPEC_LEVELS(1)) dut4 (.a(a4), .b(b4), .p(p4), .s_spec(ss4),
                          .co_spec(cs4), .s_exact(se4), .co_exact(ce4), .err(e4));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Random operand pair; mode 1 makes b close to ~a so that long propagate
  // runs appear, with a few generate bits sprinkled in.
  function automatic logic [31:0] pick_b(logic [31:0] a, int mode);
    if (mode == 0) return $urandom;
    return ~a ^ ($urandom & $urandom & $urandom);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [64:0] ex, sp;
      a16 = 16'($urandom); b16 = 16'(pick_b(32'(a16), n % 2));
      a8  = 8'($urandom);  b8  = 8'(pick_b(32'(a8), n % 2));
      a4  = 4'($urandom);  b4  = 4'($urandom);
      if (n == 0) begin a16 = 16'h7fff; b16 = 16'h0001; end   // full carry chain
      if (n == 2) begin a16 = 16'hffff; b16 = 16'h0000; end   // all propagate, no carry
      #1;
      ex = exact_add(64'(a16), 64'(b16), 16);
      sp = spec_add(64'(a16), 64'(b16), 16, 8);
      check("16 exact", {47'b0, ce16, se16}, ex[63:0]);
      check("16 spec",  {47'b0, cs16, ss16}, sp[63:0]);
      check("16 err",   64'(e16), 64'(sp != ex));
      check("16 p",     64'(p16), 64'(a16 ^ b16));
      if (e16) n_err++; else n_ok++;

      ex = exact_add(64'(a8), 64'(b8), 8);
      sp = spec_add(64'(a8), 64'(b8), 8, 4);
      check("8 exact", {55'b0, ce8, se8}, ex[63:0]);
      check("8 spec",  {55'b0, cs8, ss8}, sp[63:0]);
      check("8 err",   64'(e8), 64'(sp != ex));

      ex = exact_add(64'(a4), 64'(b4), 4);
      sp = spec_add(64'(a4), 64'(b4), 4, 2);
      check("4 exact", {59'b0, ce4, se4}, ex[63:0]);
      check("4 spec",  {59'b0, cs4, ss4}, sp[63:0]);
      check("4 err",   64'(e4), 64'(sp != ex));
    end
    checks += 2;
    if (n_err == 0) begin failures++; $display("FAIL speculation never failed"); end
    if (n_ok  == 0) begin failures++; $display("FAIL speculation never succeeded"); end
    $display("16-bit: %0d speculation errors in %0d additions", n_err, n_err + n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
