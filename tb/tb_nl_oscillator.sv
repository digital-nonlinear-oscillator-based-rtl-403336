// tb_nl_oscillator: checks the forced nonlinear oscillator model.
//  - Gate equations: at every change of x, y or z the new value must equal
//    XNOR(z, phi), XNOR(x, z) or XOR3(x, y, phi) of the inputs present at
//    that moment (the inertial-delay model evaluates its gate then). The
//    check looks 1 ps after the event, so an input that changes within
//    that picosecond is tolerated for at most 0.1 % of the events.
//  - Free run, phi held at 0: the loops have no fixed point, so z must keep
//    toggling.
//  - Hold, phi held at 1: the equations have a fixed point (x = z, y = 1),
//    so after a transient z must stop.
//  - Forced run, phi a square wave: z must keep toggling and, sampled at
//    400 MHz, give both values in a balanced way (between 20 % and 80 %
//    ones) over 4000 samples.
module tb_nl_oscillator;
  logic phi, z;
  int   checks = 0, failures = 0;
  int   eq_err = 0, eq_n = 0;

  nl_oscillator #(.SEED(3)) dut (.phi(phi), .z(z));

  always @(dut.x) begin #0.001; eq_n++; if (dut.x !== ~(z ^ phi) && !$isunknown(phi)) eq_err++; end
  always @(dut.y) begin #0.001; eq_n++; if (dut.y !== ~(dut.x ^ z)) eq_err++; end
  always @(z)     begin #0.001; eq_n++; if (z !== (dut.x ^ dut.y ^ phi)) eq_err++; end


  int  tg;
  initial begin
    int ones;
    phi = 0;
    #5;
    // Free run.
    tg = 0;
    fork
      forever begin @(z); tg++; end
      #100;
    join_any
    disable fork;
    checks++;
    if (tg < 50) begin failures++; $display("FAIL: free run, only %0d toggles in 100 ns", tg); end
    $display("free run: %0d toggles in 100 ns", tg);
    // Hold.
    phi = 1;
    #20;
    tg = 0;
    fork
      forever begin @(z); tg++; end
      #100;
    join_any
    disable fork;
    checks++;
    if (tg != 0) begin failures++; $display("FAIL: phi=1 held, z still toggles (%0d)", tg); end
    // Forced run with a 2.9 ns excitation period.
    fork
      forever begin #1.45 phi = ~phi; end
      begin
        ones = 0;
        for (int i = 0; i < 4000; i++) begin #2.5; ones += int'(z); end
      end
    join_any
    disable fork;
    $display("forced run: %0d ones in 4000 samples", ones);
    checks++;
    if (ones < 800 || ones > 3200) begin failures++; $display("FAIL: forced run unbalanced"); end
    checks++;
    if (eq_err * 1000 > eq_n || eq_n < 100) begin
      failures++;
      $display("FAIL: %0d of %0d gate events break the gate equations", eq_err, eq_n);
    end
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
