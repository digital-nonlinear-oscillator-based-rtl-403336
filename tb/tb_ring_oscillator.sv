// tb_ring_oscillator: checks the three-stage ring oscillator model. The
// expected stage delays are worked out here from the model's documented
// formula (base delay plus a seed-derived spread, plus up to JITTER_NS of
// jitter per event); every measured period must lie between twice the sum
// of the stage delays and that value plus six jitter amounts, and two
// instances with different seeds must run at different frequencies.
module tb_ring_oscillator;
  import trng_pkg::*;

  localparam real STAGE = 0.35, SPREAD = 0.10, JIT = 0.004, SLACK = 0.004;

  logic phi_a, phi_b;
  int   checks = 0, failures = 0;

  ring_oscillator #(.SEED(1)) ra (.phi(phi_a));
  ring_oscillator #(.SEED(9)) rb (.phi(phi_b));

  function automatic real nominal(int unsigned seed);
    real s = 0.0;
    for (int i = 0; i < 3; i++)
      s += STAGE + SPREAD * real'(mix32(seed * 32'd7 + 32'(i)) % 1000) / 1000.0;
    return 2.0 * s;
  endfunction

  task automatic measure(ref logic phi, input int unsigned seed, output real mean);
    realtime t0, t1, tprev;
    real lo, hi, p;
    int bad = 0;
    lo = nominal(seed) - SLACK;
    hi = nominal(seed) + 6.0 * JIT + SLACK;
    @(posedge phi); t0 = $realtime; tprev = t0;
    for (int i = 0; i < 1000; i++) begin
      @(posedge phi);
      t1 = $realtime;
      p = t1 - tprev;
      if (p < lo || p > hi) bad++;
      tprev = t1;
    end
    mean = (t1 - t0) / 1000.0;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL: seed %0d: %0d periods outside [%0.4f, %0.4f] ns, mean %0.4f", seed, bad, lo, hi, mean);
    end
  endtask

  real ma, mb;
  initial begin
    #20;
    fork
      measure(phi_a, 1, ma);
      measure(phi_b, 9, mb);
    join
    $display("ring periods: %0.4f ns and %0.4f ns", ma, mb);
    checks++;
    if (ma - mb < 0.01 && mb - ma < 0.01) begin failures++; $display("FAIL: seeds give the same period"); end
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
