// tb_cska_rca: exhaustive check of a 4-bit and a 7-bit ripple-carry block
// (all operand and carry-in combinations for 4 bits, random for 7) against
// integer addition, plus the propagate outputs.
module tb_cska_rca;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4, p4;  logic ci4, co4, pa4;
  logic [6:0] a7, b7, s7, p7;  logic ci7, co7, pa7;

  cska_rca #(.W(4)) dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4), .p(p4), .p_all(pa4));
  cska_rca #(.W(7)) dut7 (.a(a7), .b(b7), .ci(ci7), .s(s7), .co(co7), .p(p7), .p_all(pa7));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(x); b4 = 4'(y); ci4 = c[0];
          #1;
          check("rca4 sum", {27'b0, co4, s4}, 32'(x + y + c));
          check("rca4 p", {28'b0, p4}, 32'(x ^ y));
          check("rca4 p_all", {31'b0, pa4}, 32'((x ^ y) == 15));
        end
    for (int n = 0; n < 2000; n++) begin
      a7 = 7'($urandom); b7 = 7'($urandom); ci7 = 1'($urandom);
      #1;
      check("rca7 sum", {24'b0, co7, s7}, 32'(a7) + 32'(b7) + 32'(ci7));
      check("rca7 p_all", {31'b0, pa7}, 32'((a7 ^ b7) == 7'h7f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
