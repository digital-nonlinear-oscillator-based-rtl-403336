// tb_nmux_ring: checks the frequency-programmable NMUX ring model. For each
// of the 64 settings of sel the ring is allowed to settle, then 40 periods
// are measured. The expected period, worked out here from the model's
// documented delay formula, is twice the sum of the three selected path
// delays; every measured period must lie between that value and that value
// plus six jitter amounts. The 64 settings must also give many distinct
// frequencies (the point of the tunable ring), and a change of sel while
// running must not stop the oscillation.
module tb_nmux_ring;
  import trng_pkg::*;

  localparam real STAGE = 0.35, PATH = 0.40, JIT = 0.004, SLACK = 0.004;

  logic [5:0] sel;
  logic       phi;
  int         checks = 0, failures = 0;
  real        per [64];

  nmux_ring #(.SEED(5)) dut (.sel(sel), .phi(phi));

  function automatic real nominal(logic [5:0] s);
    real t = 0.0;
    for (int st = 0; st < 3; st++) begin
      int j;
      j = int'(s[2*st +: 2]);
      t += STAGE + PATH * real'(mix32(32'd5 * 32'd16 + 32'(st * 4 + j)) % 1000) / 1000.0;
    end
    return 2.0 * t;
  endfunction

  initial begin
    int distinct, bad;
    realtime t0, tp, tn;
    sel = 0;
    for (int s = 0; s < 64; s++) begin
      real lo, hi;
      sel = 6'(s);
      repeat (6) @(posedge phi);
      lo = nominal(6'(s)) - SLACK;
      hi = nominal(6'(s)) + 6.0 * JIT + SLACK;
      bad = 0;
      @(posedge phi); t0 = $realtime; tp = t0;
      for (int i = 0; i < 40; i++) begin
        @(posedge phi);
        tn = $realtime;
        if (tn - tp < lo || tn - tp > hi) bad++;
        tp = tn;
      end
      per[s] = (tp - t0) / 40.0;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL: sel=%0d: %0d periods outside [%0.4f, %0.4f], mean %0.4f", s, bad, lo, hi, per[s]);
      end
    end
    distinct = 0;
    for (int a = 0; a < 64; a++) begin
      automatic bit uniq = 1;
      for (int b = 0; b < a; b++) if (per[a] - per[b] < 0.003 && per[b] - per[a] < 0.003) uniq = 0;
      if (uniq) distinct++;
    end
    $display("nmux ring: %0d distinct periods, %0.3f ns to %0.3f ns", distinct, per[0], per[63]);
    checks++;
    if (distinct < 24) begin failures++; $display("FAIL: only %0d distinct frequencies", distinct); end
    // Changing sel at a random moment keeps the ring running.
    #0.37 sel = 6'd42;
    checks++;
    fork
      begin repeat (20) @(posedge phi); end
      begin #200; failures++; $display("FAIL: ring stopped after a sel change"); end
    join_any
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
