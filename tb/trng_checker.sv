// trng_checker: stimulus and checks for dno_trng_top, shared by the reduced
// and the full-size end-to-end testbenches.
//
// Sequence: reset; tuning scan (optionally a second one after dropping
// tune_en, the re-tune case); whitened and dual-oscillator streams checked
// for WHITEN_BITS cycles; then one acquisition per mode in MODES (bit i set
// = capture source i), each received back from the RS232 line.
//
// Checks, all against values worked out here:
//  - the selector: every sampled bit the selector used is recorded, and the
//    selection algorithm is replayed on them (K-bit symbols from K
//    consecutive bits, one count cycle, overflow at the 2^L-th occurrence,
//    two bookkeeping cycles per source); the oscillator setting at every
//    cycle, the cycle at which tuning ends, the winner and its count must
//    match, and the winner must then be applied to the oscillator;
//  - the whitened stream equals the raw bits XOR an LFSR built from the
//    polynomial x^8 + x^6 + x^5 + x^4 + 1 (stages 1..8, feedback from 8, 6,
//    5, 4, start state 0x01), one cycle later, only once tuning is done;
//  - the dual stream equals the XOR of the two fixed oscillators' sampled
//    bits, one cycle later;
//  - each acquisition returns, over the serial line (8N1, LSB first),
//    exactly the first ACQ_LEN*8 valid bits of the chosen stream after the
//    start, packed first bit most significant.
// Each mechanism (scan, source switch, overflow, whitening, 2:1 XOR, each
// capture mode, serial byte, re-tune) is counted; one that never happened
// is a failure.
module trng_checker #(
  parameter int unsigned K           = 2,
  parameter int unsigned L           = 4,
  parameter int unsigned CPB         = 8,
  parameter int unsigned ACQ_DEPTH   = 64,
  parameter int unsigned ACQ_LEN     = 4,
  parameter bit [3:0]    MODES       = 4'b1111,
  parameter bit          RETUNE      = 1,
  parameter int unsigned WHITEN_BITS = 400,
  localparam int unsigned AW         = $clog2(ACQ_DEPTH)
) (
  input  logic           clk,
  output logic           rst_n,
  output logic           tune_en,
  input  logic           tune_done,
  input  logic [5:0]     dno_sel,
  input  logic [5:0]     best_sel,
  input  logic [K+L-1:0] best_cnt,
  input  logic           raw_valid,
  input  logic           raw_bit,
  input  logic           rnd_valid,
  input  logic           rnd_bit,
  input  logic           dual_valid,
  input  logic           dual_bit,
  input  logic [1:0]     fixed_bits,
  output logic           acq_start,
  output logic [1:0]     acq_src,
  output logic [AW:0]    acq_len,
  input  logic           acq_busy,
  input  logic           acq_done,
  input  logic           uart_txd,
  output logic           finished,
  output int             checks,
  output int             failures
);

  // ---------------- mechanism counters ----------------
  int n_scans = 0, n_switch = 0, n_ovf = 0, n_white = 0, n_dual = 0, n_bytes = 0, n_retune = 0;
  int n_mode [4] = '{0, 0, 0, 0};

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  // ---------------- recording at every clock edge ----------------
  // Values are read in the edge's active region, i.e. before the edge's
  // register updates: exactly what the design's flip-flops see.
  bit          rawq [$];
  logic [5:0]  selq [$];
  bit          acq_rec = 0;
  bit          acqq [$];
  bit          whiteq [$];
  bit          chk_streams = 0;
  logic [1:0]  fixed_prev;
  bit          dual_prev_valid = 0;
  logic        lfsr_st [1:8];

  function automatic bit lfsr_step();
    bit out, fb;
    out = lfsr_st[8];
    fb  = lfsr_st[8] ^ lfsr_st[6] ^ lfsr_st[5] ^ lfsr_st[4];
    for (int i = 8; i > 1; i--) lfsr_st[i] = lfsr_st[i-1];
    lfsr_st[1] = fb;
    return out;
  endfunction

  always @(posedge clk) begin
    if (tune_en && !tune_done) begin
      rawq.push_back(raw_bit);
      selq.push_back(dno_sel);
    end
    // Whitened stream: output at this edge answers the push of the last one.
    if (rst_n) begin
      if (rnd_valid) begin
        if (whiteq.size() == 0) fail("whitened bit without a raw bit");
        else begin
          bit e;
          e = whiteq.pop_front();
          if (chk_streams) begin
            checks++;
            n_white++;
            if (rnd_bit !== e) fail("whitened bit differs from raw XOR LFSR");
          end
        end
      end
      if (raw_valid && tune_done) whiteq.push_back(raw_bit ^ lfsr_step());
      if (chk_streams && dual_prev_valid) begin
        checks++;
        n_dual++;
        if (!dual_valid || dual_bit !== (fixed_prev[0] ^ fixed_prev[1])) fail("dual stream is not the XOR of the two oscillators");
      end
      fixed_prev = fixed_bits;
      dual_prev_valid = raw_valid;
    end
    if (acq_rec) begin
      unique case (acq_src)
        2'd0: if (rnd_valid)  acqq.push_back(rnd_bit);
        2'd1: if (raw_valid)  acqq.push_back(raw_bit);
        2'd2: if (dual_valid) acqq.push_back(dual_bit);
        default: if (raw_valid) acqq.push_back(fixed_bits[0]);
      endcase
    end
  end

  // ---------------- serial receiver ----------------
  logic [7:0] rxq [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      if (uart_txd !== 1'b0) fail("serial start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      if (uart_txd !== 1'b1) fail("serial stop bit");
      rxq.push_back(b);
      n_bytes++;
    end
  end

  // ---------------- selector reference ----------------
  task automatic tune_and_check();
    int unsigned e, tot, sym, best_c, best_s, nedge, sel_err;
    int unsigned cnt [];
    int unsigned exp_sel [$];
    bit ovf;
    rawq.delete(); selq.delete();
    @(posedge clk); #0.1 tune_en = 1;
    nedge = 0;
    forever begin
      @(posedge clk); #0.1;
      nedge++;
      if (tune_done) break;
      if (nedge > 2_000_000) begin fail("tuning never ends"); return; end
    end
    // Replay the algorithm on the recorded bits.
    e = 0; best_c = 0; best_s = 0;
    for (int unsigned s = 0; s < 64; s++) begin
      cnt = new[1 << K];
      tot = 0; ovf = 0;
      while (!ovf) begin
        sym = 0;
        for (int unsigned b = 0; b < K; b++) sym = (sym << 1) | (e + b < rawq.size() ? int'(rawq[e + b]) : 0);
        tot++;
        if (cnt[sym] == (1 << L) - 1) ovf = 1; else cnt[sym]++;
        for (int unsigned b = 0; b <= K; b++) exp_sel.push_back(s);
        e += K + 1;
      end
      n_ovf++;
      if (tot >= best_c) begin best_c = tot; best_s = s; end
      exp_sel.push_back(s); exp_sel.push_back(s);
      e += 2;
    end
    sel_err = 0;
    for (int unsigned i = 0; i < selq.size() && i < exp_sel.size(); i++) begin
      if (selq[i] != 6'(exp_sel[i])) sel_err++;
      if (i > 0 && selq[i] != selq[i-1]) n_switch++;
    end
    checks += 4;
    if (sel_err != 0) fail($sformatf("oscillator setting wrong at %0d of %0d cycles", sel_err, selq.size()));
    if (nedge != e + 1) fail($sformatf("tuning took %0d cycles, expected %0d", nedge, e + 1));
    if (best_sel !== 6'(best_s) || best_cnt !== (K+L)'(best_c))
      fail($sformatf("selected %0d (count %0d), expected %0d (count %0d)", best_sel, best_cnt, best_s, best_c));
    @(posedge clk); #0.1;
    if (dno_sel !== best_sel) fail("winner not applied to the oscillator");
    n_scans++;
    $display("tuning: setting %0d selected, count %0d, %0d cycles", best_sel, best_cnt, nedge);
  endtask

  // ---------------- acquisition ----------------
  task automatic acquire(input int mode);
    int waited;
    acqq.delete(); rxq.delete();
    acq_src = 2'(mode);
    acq_len = (AW+1)'(ACQ_LEN);
    @(posedge clk); #0.1 acq_start = 1;
    @(posedge clk); #0.1 acq_start = 0; acq_rec = 1;
    waited = 0;
    while (!acq_done && waited < 100_000_000) begin @(posedge clk); #0.1; waited++; if (acq_rec && acqq.size() >= ACQ_LEN * 8) acq_rec = 0; end
    acq_rec = 0;
    repeat (11 * CPB) @(posedge clk);
    #0.1;
    checks++;
    if (rxq.size() != ACQ_LEN) fail($sformatf("mode %0d: %0d bytes received, expected %0d", mode, rxq.size(), ACQ_LEN));
    for (int i = 0; i < ACQ_LEN && i < rxq.size(); i++) begin
      logic [7:0] e;
      for (int k = 0; k < 8; k++) e[7-k] = (i * 8 + k < acqq.size()) ? acqq[i * 8 + k] : 1'b0;
      checks++;
      if (rxq[i] !== e) fail($sformatf("mode %0d byte %0d: received %02h, expected %02h", mode, i, rxq[i], e));
    end
    n_mode[mode]++;
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    rst_n = 0; tune_en = 0; acq_start = 0; acq_src = 0; acq_len = 0;
    for (int i = 1; i <= 8; i++) lfsr_st[i] = 0;
    lfsr_st[1] = 1;
    repeat (4) @(posedge clk);
    #0.1 rst_n = 1;
    tune_and_check();
    if (RETUNE) begin
      @(posedge clk); #0.1 tune_en = 0;
      repeat (2) @(posedge clk);
      #0.1;
      checks++;
      if (tune_done || rnd_valid) fail("dropping tune_en does not clear the selector");
      tune_and_check();
      n_retune++;
    end
    chk_streams = 1;
    repeat (WHITEN_BITS) @(posedge clk);
    chk_streams = 0;
    for (int m = 0; m < 4; m++) if (MODES[m]) acquire(m);
    // Every mechanism must have happened.
    checks += 7;
    if (n_scans == 0) fail("no tuning scan");
    if (n_switch == 0) fail("no oscillator setting change");
    if (n_ovf == 0) fail("no symbol counter overflow");
    if (n_white == 0) fail("no whitened bit");
    if (n_dual == 0) fail("no dual-oscillator bit");
    if (n_bytes == 0) fail("no serial byte");
    if (RETUNE && n_retune == 0) fail("no re-tune");
    for (int m = 0; m < 4; m++) if (MODES[m]) begin
      checks++;
      if (n_mode[m] == 0) fail($sformatf("capture mode %0d never ran", m));
    end
    $display("mechanisms: scans %0d, setting changes %0d, overflows %0d, whitened bits %0d, dual bits %0d, serial bytes %0d, re-tunes %0d, captures %0d/%0d/%0d/%0d",
             n_scans, n_switch, n_ovf, n_white, n_dual, n_bytes, n_retune, n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    finished = 1;
  end

endmodule
