// tb_sync_sampler: checks that the synchronization interface samples its
// asynchronous input once per rising clock edge with one cycle of latency,
// that reset clears bit and valid, and that valid rises on the first sample.
// The input changes at random times between edges; the testbench records
// the value present at each edge and compares it with bit_o one cycle later.
module tb_sync_sampler;
  logic clk = 0;
  always #1.25 clk = ~clk;   // 400 MHz sampling clock

  logic rst_n, z, q, v;
  int   checks = 0, failures = 0;
  logic at_edge;

  sync_sampler dut (.clk(clk), .rst_n(rst_n), .z_i(z), .bit_o(q), .valid_o(v));

  // Asynchronous input: toggles after random delays unrelated to the clock.
  initial begin
    z = 0;
    forever begin
      #(0.1 + real'($urandom % 3000) / 1000.0);
      z = ~z;
    end
  end

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    #0.1;
    checks++;
    if (q !== 1'b0 || v !== 1'b0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1;
    @(posedge clk);
    at_edge = z;
    #0.1;
    checks++;
    if (v !== 1'b1 || q !== at_edge) begin failures++; $display("FAIL: first sample"); end
    repeat (2000) begin
      @(posedge clk);
      at_edge = z;
      #0.1;
      checks++;
      if (q !== at_edge) begin
        failures++;
        if (failures < 5) $display("FAIL: sampled %0b, input at edge %0b", q, at_edge);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
