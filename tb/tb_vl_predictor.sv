// tb_vl_predictor: the predictor must be 1 exactly when every bit of its
// window propagates (a_i != b_i). Exhaustive for a 4-bit window, random and
// directed for the 16-bit default window.
module tb_vl_predictor;
  int checks = 0, failures = 0, fired = 0;

  logic [3:0]  a4, b4;  logic p4;
  logic [15:0] a, b;    logic p16;

  vl_predictor #(.W(4)) dut4 (.a(a4), .b(b4), .pred(p4));
  vl_predictor          dut  (.a(a),  .b(b),  .pred(p16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        logic exp;
        a4 = 4'(x); b4 = 4'(y);
        exp = 1'b1;
        for (int i = 0; i < 4; i++) if (a4[i] == b4[i]) exp = 1'b0;
        #1;
        checks++;
        if (p4 !== exp) begin failures++; $display("FAIL w4 %0h %0h", x, y); end
      end
    for (int n = 0; n < 3000; n++) begin
      logic exp;
      a = 16'($urandom);
      // Every third vector makes the window propagate except maybe one bit.
      b = (n % 3 == 0) ? ~a ^ (16'(1) << ($urandom % 20)) : 16'($urandom);
      exp = 1'b1;
      for (int i = 0; i < 16; i++) if (a[i] == b[i]) exp = 1'b0;
      #1;
      checks++;
      if (exp) fired++;
      if (p16 !== exp) begin failures++; $display("FAIL w16 %04h %04h", a, b); end
    end
    checks++;
    if (fired == 0) begin failures++; $display("FAIL predictor never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
