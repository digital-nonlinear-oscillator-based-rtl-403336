// tb_acq_megabit: the acquisition memory at its default size, holding the
// one-million-bit sequences used to evaluate the generator.
//
// A default acq_buffer (131072 bytes) is fed one bit on every clock, the
// full sampling rate, with no gaps. The bits come from a hash of the bit
// index, so the expected bytes (first bit most significant) can be worked
// out here independently. Two captures are run:
//   1. len = 125000 bytes: exactly 1,000,000 bits;
//   2. len = 0: the whole memory, 1,048,576 bits.
// For each capture the testbench checks that busy rises on start, that
// capture ends on the last needed bit (the first byte is offered within
// 3 clocks, while the bits that follow are ignored), every byte read back,
// the byte count, the read-out rate with an always-ready consumer (at most
// 3 clocks per byte), the single done pulse and busy falling at the end.
module tb_acq_megabit;
  localparam int unsigned DEPTH = 131072;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0;
  always #1.25 clk = ~clk;  // 400 MHz sampling clock

  logic          rst_n, start, bit_valid, bit_in, tx_valid, tx_ready, busy, done;
  logic [AW:0]   len;
  logic [7:0]    tx_data;
  int            checks = 0, failures = 0;

  acq_buffer dut (.clk(clk), .rst_n(rst_n), .start_i(start), .len_bytes_i(len),
    .bit_valid_i(bit_valid), .bit_i(bit_in), .tx_valid_o(tx_valid), .tx_data_o(tx_data),
    .tx_ready_i(tx_ready), .busy_o(busy), .done_o(done));

  // Test stream: bit n of capture c.
  function automatic logic stream_bit(int unsigned c, int unsigned n);
    logic [31:0] h;
    h = (n + 32'd1) * 32'h9E37_79B1 ^ (c + 32'd7) * 32'h85EB_CA6B;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    return h[3];
  endfunction

  function automatic logic [7:0] stream_byte(int unsigned c, int unsigned i);
    logic [7:0] v;
    for (int unsigned k = 0; k < 8; k++) v[7 - k] = stream_bit(c, 8 * i + k);
    return v;
  endfunction

  task automatic capture(input int unsigned c, input int unsigned len_in, input int unsigned nbytes);
    int unsigned wait_c, got, cycles, dones, bad;
    len = (AW+1)'(len_in);
    @(posedge clk); #0.1 start = 1;
    @(posedge clk); #0.1 start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL capture %0d: busy not set", c); end
    // One bit per clock, a few extra bits past the end.
    for (int unsigned n = 0; n < 8 * nbytes + 4; n++) begin
      bit_valid = 1;
      bit_in = stream_bit(c, n);
      @(posedge clk); #0.1;
      if (n == 8 * nbytes - 1) wait_c = 0;
      if (n >= 8 * nbytes - 1 && tx_valid) break;
      if (n >= 8 * nbytes) wait_c++;
    end
    bit_valid = 0;
    checks++;
    if (!tx_valid || wait_c > 3) begin
      failures++;
      $display("FAIL capture %0d: read-out did not start after the last bit", c);
    end
    // Read-out with a consumer that is always ready.
    tx_ready = 1; got = 0; cycles = 0; dones = 0; bad = 0;
    while (busy && cycles < 4 * nbytes) begin
      if (tx_valid) begin
        if (tx_data !== stream_byte(c, got)) begin
          bad++;
          if (bad <= 5) $display("FAIL capture %0d: byte %0d got %02h expected %02h",
                                 c, got, tx_data, stream_byte(c, got));
        end
        got++;
      end
      @(posedge clk); #0.1;
      cycles++;
      if (done) dones++;
    end
    tx_ready = 0;
    checks += 5;
    if (bad != 0) begin failures++; $display("FAIL capture %0d: %0d wrong bytes", c, bad); end
    if (got != nbytes) begin failures++; $display("FAIL capture %0d: %0d bytes, expected %0d", c, got, nbytes); end
    if (cycles > 3 * nbytes + 2) begin failures++; $display("FAIL capture %0d: read-out took %0d clocks", c, cycles); end
    if (dones != 1) begin failures++; $display("FAIL capture %0d: %0d done pulses", c, dones); end
    if (busy) begin failures++; $display("FAIL capture %0d: still busy", c); end
    $display("capture %0d: %0d bits stored, %0d bytes read back in %0d clocks", c, 8 * got, got, cycles);
  endtask

  initial begin
    rst_n = 0; start = 0; bit_valid = 0; bit_in = 0; tx_ready = 0; len = '0;
    repeat (3) @(posedge clk);
    #0.1 rst_n = 1;
    capture(0, 125000, 125000);
    capture(1, 0, DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
