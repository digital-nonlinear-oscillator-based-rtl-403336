// tb_dno_trng_top: end-to-end test of the TRNG at reduced sizes (selector
// K = 2, L = 4; 8 clocks per serial bit; 64-byte acquisition memory). Two
// tuning scans (the second after dropping tune_en), whitened and dual
// streams, and a 4-byte acquisition in each of the four capture modes, all
// checked by trng_checker. The oscillators run at their default delays and
// the sampling clock at 400 MHz.
module tb_dno_trng_top;
  localparam int unsigned K = 2, L = 4, CPB = 8, DEPTH = 64;

  logic clk = 0;
  always #1.25 clk = ~clk;

  logic rst_n, tune_en, tune_done, raw_valid, raw_bit, rnd_valid, rnd_bit;
  logic dual_valid, dual_bit, acq_start, acq_busy, acq_done, uart_txd, finished;
  logic [5:0] dno_sel, best_sel;
  logic [K+L-1:0] best_cnt;
  logic [1:0] fixed_bits, acq_src;
  logic [$clog2(DEPTH):0] acq_len;
  int checks, failures;

  dno_trng_top #(.K(K), .L(L), .ACQ_DEPTH(DEPTH), .CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .tune_en_i(tune_en), .tune_done_o(tune_done),
    .dno_sel_o(dno_sel), .best_sel_o(best_sel), .best_cnt_o(best_cnt),
    .raw_valid_o(raw_valid), .raw_bit_o(raw_bit), .rnd_valid_o(rnd_valid), .rnd_bit_o(rnd_bit),
    .dual_valid_o(dual_valid), .dual_bit_o(dual_bit), .fixed_bits_o(fixed_bits),
    .acq_start_i(acq_start), .acq_src_i(acq_src), .acq_len_i(acq_len),
    .acq_busy_o(acq_busy), .acq_done_o(acq_done), .uart_txd_o(uart_txd));

  trng_checker #(.K(K), .L(L), .CPB(CPB), .ACQ_DEPTH(DEPTH), .ACQ_LEN(4),
                 .MODES(4'b1111), .RETUNE(1), .WHITEN_BITS(400)) chk (
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
    repeat (400_000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
