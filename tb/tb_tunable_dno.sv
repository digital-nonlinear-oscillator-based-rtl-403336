// tb_tunable_dno: checks the tunable oscillator model end to end. For 16
// settings of sel the output is sampled at 400 MHz for 2000 cycles: z must
// keep toggling and give both bit values, and the excitation period seen
// inside must follow sel (the longest and shortest settings must differ by
// at least 5 %). The bit statistics (fraction of ones, number of equal
// neighbours) must differ between settings, since each setting is a
// different dynamical system.
module tb_tunable_dno;
  logic clk = 0;
  always #1.25 clk = ~clk;

  logic [5:0] sel;
  logic       z;
  int         checks = 0, failures = 0;
  int         ones [16], same [16];
  real        pmin = 1.0e9, pmax = 0.0;

  tunable_dno #(.SEED(4)) dut (.sel(sel), .z(z));

  initial begin
    sel = 0;
    for (int k = 0; k < 16; k++) begin
      int tg;
      logic prev;
      realtime t0;
      sel = 6'(k * 4 + (k % 4));
      repeat (20) @(posedge clk);
      // Excitation period for this setting.
      @(posedge dut.phi); t0 = $realtime;
      repeat (20) @(posedge dut.phi);
      if (($realtime - t0) / 20.0 < pmin) pmin = ($realtime - t0) / 20.0;
      if (($realtime - t0) / 20.0 > pmax) pmax = ($realtime - t0) / 20.0;
      ones[k] = 0; same[k] = 0; tg = 0;
      @(posedge clk); prev = z;
      for (int i = 0; i < 2000; i++) begin
        @(posedge clk);
        ones[k] += int'(z);
        if (z == prev) same[k]++;
        else tg++;
        prev = z;
      end
      checks++;
      if (tg < 20 || ones[k] < 100 || ones[k] > 1900) begin
        failures++;
        $display("FAIL: sel=%0d: %0d changes, %0d ones in 2000 samples", sel, tg, ones[k]);
      end
    end
    checks++;
    if (pmax < pmin * 1.05) begin failures++; $display("FAIL: excitation period does not follow sel (%0.3f..%0.3f ns)", pmin, pmax); end
    checks++;
    begin
      int distinct = 0;
      for (int a = 0; a < 16; a++) begin
        automatic bit u = 1;
        for (int b = 0; b < a; b++) if (ones[a] == ones[b] && same[a] == same[b]) u = 0;
        if (u) distinct++;
      end
      $display("tunable DNO: excitation %0.3f..%0.3f ns, %0d distinct bit statistics of 16", pmin, pmax, distinct);
      if (distinct < 8) begin failures++; $display("FAIL: settings give the same statistics"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
