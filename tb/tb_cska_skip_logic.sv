// tb_cska_skip_logic: truth-table check of the AOI and OAI skip gates. Both
// must compute the skip carry G | P&C, the AOI returning it complemented
// from true inputs, the OAI returning it true from complemented inputs.
module tb_cska_skip_logic;
  int checks = 0, failures = 0;

  logic g, p, c, y_aoi, y_oai;

  cska_skip_logic #(.OAI(1'b0)) dut_aoi (.g(g),  .p(p),  .c_in(c),  .c_out(y_aoi));
  cska_skip_logic #(.OAI(1'b1)) dut_oai (.g(~g), .p(~p), .c_in(~c), .c_out(y_oai));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic carry;
      {g, p, c} = 3'(v);
      carry = g | (p & c);
      #1;
      checks += 2;
      if (y_aoi !== ~carry) begin failures++; $display("FAIL aoi gpc=%03b", v[2:0]); end
      if (y_oai !==  carry) begin failures++; $display("FAIL oai gpc=%03b", v[2:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
