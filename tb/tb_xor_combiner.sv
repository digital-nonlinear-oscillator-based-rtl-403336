// tb_xor_combiner: checks the parallel-stream XOR compression. Two
// configurations: the default pair of streams and a four-stream one. Each
// cycle random bits are applied and the registered output is compared with
// the parity worked out here; valid_o must follow valid_i by one cycle and
// the output must hold when valid_i is low. Also measures the bias
// reduction: two streams with 70 % ones (bias 0.2) must combine to about
// 42 % ones (2*0.7*0.3), i.e. bias 2*0.2*0.2 = 0.08.
module tb_xor_combiner;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, vi, vo2, bo2, vo4, bo4;
  logic [1:0] b2;
  logic [3:0] b4;
  int   checks = 0, failures = 0, ones = 0, nval = 0;
  logic e2, e4, v_d, hold2;

  xor_combiner               d2 (.clk(clk), .rst_n(rst_n), .valid_i(vi), .bits_i(b2), .valid_o(vo2), .bit_o(bo2));
  xor_combiner #(.N_IN(4))   d4 (.clk(clk), .rst_n(rst_n), .valid_i(vi), .bits_i(b4), .valid_o(vo4), .bit_o(bo4));

  initial begin
    rst_n = 0; vi = 0; b2 = 0; b4 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    hold2 = 0;
    for (int n = 0; n < 4000; n++) begin
      vi = ($urandom % 5) != 0;
      b2[0] = ($urandom % 100) < 70;
      b2[1] = ($urandom % 100) < 70;
      b4 = 4'($urandom);
      e2 = b2[0] ^ b2[1];
      e4 = b4[0] ^ b4[1] ^ b4[2] ^ b4[3];
      @(posedge clk);
      v_d = vi;
      #1;
      checks++;
      if (vo2 !== v_d || vo4 !== v_d) begin failures++; $display("FAIL: valid"); end
      if (v_d) begin
        checks++;
        if (bo2 !== e2 || bo4 !== e4) begin failures++; if (failures < 5) $display("FAIL: parity"); end
        hold2 = bo2;
        nval++;
        ones += bo2;
      end else begin
        checks++;
        if (bo2 !== hold2) begin failures++; $display("FAIL: output changed without valid"); end
      end
    end
    checks++;
    if (ones * 100 < nval * 38 || ones * 100 > nval * 46) begin
      failures++;
      $display("FAIL: XOR of two 70%% streams gave %0d of %0d ones", ones, nval);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
