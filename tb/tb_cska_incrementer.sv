// tb_cska_incrementer: exhaustive check of the half-adder incrementation
// chain for both carry polarities: s must equal x + carry modulo 2**W.
module tb_cska_incrementer;
  int checks = 0, failures = 0;

  logic [4:0] x, s_t, s_n;
  logic       ci;

  cska_incrementer #(.W(5), .CI_INV(1'b0)) dut_t (.x(x), .ci(ci),  .s(s_t));
  cska_incrementer #(.W(5), .CI_INV(1'b1)) dut_n (.x(x), .ci(~ci), .s(s_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++)
      for (int c = 0; c < 2; c++) begin
        logic [4:0] exp;
        x = 5'(v); ci = c[0];
        exp = 5'(v + c);
        #1;
        checks += 2;
        if (s_t !== exp) begin failures++; $display("FAIL true  x=%0d c=%0d s=%0d", v, c, s_t); end
        if (s_n !== exp) begin failures++; $display("FAIL compl x=%0d c=%0d s=%0d", v, c, s_n); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
