// tb_dno_c: checks the fixed oscillator model. Two instances with different
// placements (seeds) are sampled at 400 MHz for 8000 cycles. Each must keep
// toggling and give a fraction of ones between 20 % and 80 %, and the two
// sampled streams must not track each other (they agree on between 30 %
// and 70 % of the samples), as two physically separate sources should.
module tb_dno_c;
  logic clk = 0;
  always #1.25 clk = ~clk;

  logic za, zb;
  int   checks = 0, failures = 0;
  int   onesa = 0, onesb = 0, agree = 0, tga = 0, tgb = 0;

  dno_c #(.SEED(11)) da (.z(za));
  dno_c #(.SEED(12)) db (.z(zb));

  initial begin
    logic pa, pb;
    repeat (20) @(posedge clk);
    pa = za; pb = zb;
    for (int i = 0; i < 8000; i++) begin
      @(posedge clk);
      onesa += int'(za); onesb += int'(zb);
      agree += int'(za == zb);
      tga += int'(za != pa); tgb += int'(zb != pb);
      pa = za; pb = zb;
    end
    $display("dno_c: ones %0d / %0d, changes %0d / %0d, agreement %0d of 8000", onesa, onesb, tga, tgb, agree);
    checks += 3;
    if (tga < 200 || tgb < 200) begin failures++; $display("FAIL: oscillator output stuck"); end
    if (onesa < 1600 || onesa > 6400 || onesb < 1600 || onesb > 6400) begin failures++; $display("FAIL: bias"); end
    if (agree < 2400 || agree > 5600) begin failures++; $display("FAIL: streams track each other"); end
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
