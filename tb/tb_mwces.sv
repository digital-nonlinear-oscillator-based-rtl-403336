// tb_mwces: self-checking testbench of the Maximum Worst-Case Entropy
// Selector. Three configurations run side by side against the reference
// model in mwces_harness: a small one (4 sources, K=2, L=4), one with a
// source count that is not a power of two (5 sources, K=1, L=5) and the
// default configuration (64 sources, K=3, L=8). Each checks clearing by en,
// the source index at every clock edge, the cycle at which done rises, the
// selected source and its count.
module tb_mwces;
  logic clk = 0;
  always #5 clk = ~clk;

  logic f0, f1, f2;
  int   c0, c1, c2, e0, e1, e2;
  int   checks, failures;

  mwces_harness #(.N_SRC(4),  .K(2), .L(4), .SEED(1)) h0 (.clk(clk), .finished(f0), .checks(c0), .failures(e0));
  mwces_harness #(.N_SRC(5),  .K(1), .L(5), .SEED(2)) h1 (.clk(clk), .finished(f1), .checks(c1), .failures(e1));
  mwces_harness #(.N_SRC(64), .K(3), .L(8), .SEED(3)) h2 (.clk(clk), .finished(f2), .checks(c2), .failures(e2));

  initial begin
    @(posedge clk);  // let the harnesses clear their flags first
    wait (f0 && f1 && f2);
    checks = c0 + c1 + c2;
    failures = e0 + e1 + e2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog: selector did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + 1, e0 + e1 + e2 + 1);
    $finish;
  end
endmodule
