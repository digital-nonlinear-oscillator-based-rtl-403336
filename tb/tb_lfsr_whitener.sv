// tb_lfsr_whitener: checks the post-processing XOR against a reference LFSR
// written straight from the polynomial x^8 + x^6 + x^5 + x^4 + 1 (stages
// 1..8, feedback from stages 8, 6, 5, 4 into stage 1, output stage 8,
// initial state 0x01 with stage 1 set). Feeds random raw bits with random
// gaps in valid, checks every whitened bit, that the key stream repeats
// with period 255 and no shorter, and that valid_o follows valid_i by one
// cycle.
module tb_lfsr_whitener;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, vi, bi, vo, bo;
  int   checks = 0, failures = 0;
  logic st [1:8];
  logic ks [$];
  logic exp_q [$];
  logic vi_d;

  lfsr_whitener dut (.clk(clk), .rst_n(rst_n), .valid_i(vi), .bit_i(bi), .valid_o(vo), .bit_o(bo));

  function automatic logic ref_step();
    logic out, fb;
    out = st[8];
    fb  = st[8] ^ st[6] ^ st[5] ^ st[4];
    for (int i = 8; i > 1; i--) st[i] = st[i-1];
    st[1] = fb;
    return out;
  endfunction

  initial begin
    for (int i = 1; i <= 8; i++) st[i] = 0;
    st[1] = 1;
    rst_n = 0; vi = 0; bi = 0; vi_d = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      vi = ($urandom % 4) != 0;
      bi = 1'($urandom);
      if (vi) begin
        logic k;
        k = ref_step();
        ks.push_back(k);
        exp_q.push_back(bi ^ k);
      end
      @(posedge clk);
      vi_d = vi;
      #1;
      checks++;
      if (vo !== vi_d) begin failures++; $display("FAIL: valid_o"); end
      if (vi_d) begin
        logic e;
        e = exp_q.pop_front();
        checks++;
        if (bo !== e) begin
          failures++;
          if (failures < 5) $display("FAIL: bit %0d got %0b expected %0b", n, bo, e);
        end
      end
    end
    // Period of the key stream: 255 and no divisor of it.
    checks++;
    begin
      bit ok255, ok_short;
      ok255 = 1;
      for (int i = 0; i + 255 < ks.size(); i++) if (ks[i] != ks[i+255]) ok255 = 0;
      ok_short = 0;
      for (int p = 1; p < 255; p++) begin
        bit same;
        if (255 % p != 0) continue;
        same = 1;
        for (int i = 0; i + p < 255; i++) if (ks[i] != ks[i+p]) same = 0;
        if (same) ok_short = 1;
      end
      if (!ok255 || ok_short || ks.size() < 600) begin failures++; $display("FAIL: key stream period"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
