// tb_dno_trng_top_full: one complete operation of the TRNG with every
// parameter at its default: a full 64-setting tuning scan with K = 3 and
// L = 8, checked against the replayed selection algorithm; whitened and
// dual streams checked for 1000 cycles; then 2-byte acquisitions of the
// whitened stream and of the dual-oscillator stream sent over the serial
// line at the default bit time (3472 clocks), received and compared.
// Sampling clock 400 MHz.
module tb_dno_trng_top_full;
  localparam int unsigned K = 3, L = 8, CPB = 3472, DEPTH = 131072;

  logic clk = 0;
  always #1.25 clk = ~clk;

  logic rst_n, tune_en, tune_done, raw_valid, raw_bit, rnd_valid, rnd_bit;
  logic dual_valid, dual_bit, acq_start, acq_busy, acq_done, uart_txd, finished;
  logic [5:0] dno_sel, best_sel;
  logic [K+L-1:0] best_cnt;
  logic [1:0] fixed_bits, acq_src;
  logic [$clog2(DEPTH):0] acq_len;
  int checks, failures;

  dno_trng_top dut (
    .clk(clk), .rst_n(rst_n), .tune_en_i(tune_en), .tune_done_o(tune_done),
    .dno_sel_o(dno_sel), .best_sel_o(best_sel), .best_cnt_o(best_cnt),
    .raw_valid_o(raw_valid), .raw_bit_o(raw_bit), .rnd_valid_o(rnd_valid), .rnd_bit_o(rnd_bit),
    .dual_valid_o(dual_valid), .dual_bit_o(dual_bit), .fixed_bits_o(fixed_bits),
    .acq_start_i(acq_start), .acq_src_i(acq_src), .acq_len_i(acq_len),
    .acq_busy_o(acq_busy), .acq_done_o(acq_done), .uart_txd_o(uart_txd));

  trng_checker #(.K(K), .L(L), .CPB(CPB), .ACQ_DEPTH(DEPTH), .ACQ_LEN(2),
                 .MODES(4'b0101), .RETUNE(0), .WHITEN_BITS(1000)) chk (
    .clk(clk), .rst_n(rst_n), .tune_en(tune_en), .tune_done(tune_done), .dno_sel(dno_sel),
    .best_sel(best_sel), .best_cnt(best_cnt), .raw_valid(raw_valid), .raw_bit(raw_bit),
    .rnd_valid(rnd_valid), .rnd_bit(rnd_bit), .dual_valid(dual_valid), .dual_bit(dual_bit),
    .fixed_bits(fixed_bits), .acq_start(acq_start), .acq_src(acq_src), .acq_len(acq_len),
    .acq_busy(acq_busy), .acq_done(acq_done), .uart_txd(uart_txd),
    .finished(finished), .checks(checks), .failures(failures));

  initial begin
    @(posedge finished);
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
