// tb_vl_controller: drives the latency controller with random requests and
// random "slow" flags and compares every output, every cycle, with a
// cycle-level reference model of the intended behaviour: one cycle per fast
// operation, two per slow one, a new operation accepted in the cycle the
// current one completes. Counts fast and slow operations, back-to-back
// issues and stalled requests; each must occur.
module tb_vl_controller;
  int checks = 0, failures = 0;
  int n_fast = 0, n_slow = 0, n_b2b = 0, n_stall = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, slow = 1'b0;
  logic in_ready, load, correct, res_load, second;

  vl_controller dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                     .slow(slow), .load(load), .correct(correct), .res_load(res_load),
                     .second(second));

  always #5 clk = ~clk;

  // Reference model: held = an operation is in the adder, sec = its second cycle.
  logic held = 1'b0, sec = 1'b0, prev_load = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      logic m_done, m_ready, m_load;
      @(negedge clk);
      // New stimulus for this cycle (a pending request is held).
      if (!(in_valid && !in_ready)) in_valid = ($urandom % 4) != 0;
      slow = ($urandom % 3) == 0;
      #1;
      m_done  = held && (sec || !slow);
      m_ready = !held || m_done;
      m_load  = in_valid && m_ready;
      checks += 5;
      if (res_load !== m_done)  begin failures++; $display("FAIL res_load cycle %0d", n); end
      if (in_ready !== m_ready) begin failures++; $display("FAIL in_ready cycle %0d", n); end
      if (load     !== m_load)  begin failures++; $display("FAIL load cycle %0d", n); end
      if (correct  !== sec)     begin failures++; $display("FAIL correct cycle %0d", n); end
      if (second   !== sec)     begin failures++; $display("FAIL second cycle %0d", n); end
      if (m_done && sec)   n_slow++;
      if (m_done && !sec)  n_fast++;
      if (m_load && prev_load) n_b2b++;
      if (in_valid && !m_ready) n_stall++;
      // Model update at the coming clock edge.
      @(posedge clk);
      prev_load = m_load;
      if (m_load)      begin held = 1'b1; sec = 1'b0; end
      else if (m_done) begin held = 1'b0; sec = 1'b0; end
      else if (held)   sec = 1'b1;
    end
    checks += 4;
    if (n_fast  == 0) begin failures++; $display("FAIL no fast operation"); end
    if (n_slow  == 0) begin failures++; $display("FAIL no slow operation"); end
    if (n_b2b   == 0) begin failures++; $display("FAIL no back-to-back issue"); end
    if (n_stall == 0) begin failures++; $display("FAIL no stalled request"); end
    $display("fast %0d slow %0d back-to-back %0d stalls %0d", n_fast, n_slow, n_b2b, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
