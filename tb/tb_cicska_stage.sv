// tb_cicska_stage: exhaustive check of an even (AOI) and an odd (OAI) 4-bit
// CI-CSKA stage: for every operand pair and incoming carry the stage sum must
// be the low bits of a+b+c and the skip carry its carry out, each in the
// polarity of its stage number.
module tb_cicska_stage;
  int checks = 0, failures = 0;

  logic [3:0] a, b, s_e, s_o, p_e, p_o;
  logic       c, co_e, co_o;

  // Stage 2 takes a true carry; stage 3 takes a complemented one.
  cicska_stage #(.W(4), .STAGE_NO(2)) dut_e (.a(a), .b(b), .c_in(c),  .s(s_e), .c_out(co_e), .p(p_e));
  cicska_stage #(.W(4), .STAGE_NO(3)) dut_o (.a(a), .b(b), .c_in(~c), .s(s_o), .c_out(co_o), .p(p_o));

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
        for (int k = 0; k < 2; k++) begin
          int t;
          a = 4'(x); b = 4'(y); c = k[0];
          t = x + y + k;
          #1;
          checks += 5;
          if (s_e  !== 4'(t))       begin failures++; $display("FAIL even sum %0d+%0d+%0d", x, y, k); end
          if (co_e !== ~t[4])       begin failures++; $display("FAIL even carry %0d+%0d+%0d", x, y, k); end
          if (s_o  !== 4'(t))       begin failures++; $display("FAIL odd sum %0d+%0d+%0d", x, y, k); end
          if (co_o !==  t[4])       begin failures++; $display("FAIL odd carry %0d+%0d+%0d", x, y, k); end
          if (p_e  !== 4'(x ^ y))   begin failures++; $display("FAIL propagate"); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
