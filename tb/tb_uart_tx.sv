// tb_uart_tx: checks the RS232 transmitter with an independent receiver.
// A fast instance (16 clocks per bit) sends 40 random bytes back to back;
// the default instance (3472 clocks per bit) sends two bytes. For every
// byte the receiver checks the start bit, the eight data bits (LSB first,
// sampled mid-bit), the stop bit, that the line stays steady within each
// bit, and that the frame lasts exactly 10 bit times (ready returns on the
// cycle after the stop bit).
module tb_uart_tx;
  logic clk = 0;
  always #1.25 clk = ~clk;

  logic rst_n;
  int   checks = 0, failures = 0;

  logic       va, ra, ta, vb, rb, tb_;
  logic [7:0] da, db;

  uart_tx #(.CLKS_PER_BIT(16)) ua (.clk(clk), .rst_n(rst_n), .valid_i(va), .data_i(da), .ready_o(ra), .txd_o(ta));
  uart_tx                      ub (.clk(clk), .rst_n(rst_n), .valid_i(vb), .data_i(db), .ready_o(rb), .txd_o(tb_));

  // Drives one byte into a transmitter and receives it from its line.
  task automatic send_and_check(input int cpb, input logic [7:0] b, ref logic v, ref logic [7:0] d,
                                ref logic rdy, ref logic line);
    logic [7:0] got;
    int steady_err;
    while (!rdy) @(posedge clk);
    #0.1 v = 1; d = b;
    @(posedge clk);
    #0.1 v = 0;
    steady_err = 0;
    // The start bit appears right after the accepting edge.
    for (int bitn = 0; bitn < 10; bitn++) begin
      logic first, mid;
      for (int c = 0; c < cpb; c++) begin
        if (c == 0) first = line;
        if (c == cpb / 2) mid = line;
        if (line !== first) steady_err++;
        if (rdy) steady_err++;
        @(posedge clk);
        #0.1;
      end
      if (bitn == 0 && mid !== 1'b0) begin failures++; $display("FAIL: start bit"); end
      if (bitn >= 1 && bitn <= 8) got[bitn-1] = mid;
      if (bitn == 9 && mid !== 1'b1) begin failures++; $display("FAIL: stop bit"); end
    end
    checks += 3;
    if (got !== b) begin failures++; $display("FAIL: sent %02h received %02h", b, got); end
    if (steady_err != 0) begin failures++; $display("FAIL: line or ready unstable within a frame (%0d)", steady_err); end
    if (!rdy) begin failures++; $display("FAIL: not ready after 10 bit times"); end
  endtask

  initial begin
    rst_n = 0; va = 0; vb = 0; da = 0; db = 0;
    repeat (3) @(posedge clk);
    #0.1 rst_n = 1;
    @(posedge clk); #0.1;
    checks++;
    if (ta !== 1'b1 || tb_ !== 1'b1 || !ra || !rb) begin failures++; $display("FAIL: idle state"); end
    fork
      for (int i = 0; i < 40; i++) send_and_check(16, 8'($urandom), va, da, ra, ta);
      begin
        send_and_check(3472, 8'hA5, vb, db, rb, tb_);
        send_and_check(3472, 8'h3C, vb, db, rb, tb_);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
