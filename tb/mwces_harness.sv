// mwces_harness: drives one mwces instance with synthetic biased sources and
// checks it against an independent software model of the selection algorithm.
//
// Each source s is a deterministic bit stream: the bit offered at clock edge
// n is 1 when a 32-bit hash of (s, n, SEED) falls below a per-source
// threshold, so every source has its own bias (and so its own p_H). The
// harness offers the bit of the source named by srcsel_o, exactly as a
// free-running source would be sampled. The reference model replays the
// algorithm: K bits per symbol taken at consecutive edges, one count edge,
// overflow when a symbol is seen for the 2^L-th time, two bookkeeping edges
// per source. It predicts the source index for every edge, the winner, the
// winner's count and the edge at which done rises.
module mwces_harness #(
  parameter int unsigned N_SRC = 4,
  parameter int unsigned K     = 2,
  parameter int unsigned L     = 4,
  parameter int unsigned SEED  = 1
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned SW = (N_SRC > 1) ? $clog2(N_SRC) : 1;

  logic          en;
  logic          sample;
  logic [SW-1:0] srcsel, best_src;
  logic [K+L-1:0] best_cnt;
  logic          done;
  int unsigned   edge_n;

  mwces #(.N_SRC(N_SRC), .K(K), .L(L)) dut (
    .clk(clk), .en(en), .sample_i(sample), .srcsel_o(srcsel),
    .best_src_o(best_src), .best_cnt_o(best_cnt), .done_o(done));

  function automatic logic gen_bit(int unsigned s, int unsigned n);
    logic [31:0] h;
    int unsigned thr;
    h = n * 32'h9E37_79B1 ^ (s + SEED) * 32'h85EB_CA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    // Source bias: from 50 % towards 20 % ones, one step per source.
    thr = 128 - ((s * 7 + SEED * 3) % 11) * 8;
    return (h[7:0] < thr[7:0]) || (thr >= 256);
  endfunction

  // Reference model results.
  int unsigned exp_sel [];    // expected source index for each edge
  int unsigned exp_best, exp_cnt, exp_done_edge;

  task automatic run_model();
    int unsigned e, best_c, tot, sym, cnt [];
    bit ovf;
    exp_sel = new[0];
    e = 0; best_c = 0; exp_best = 0;
    for (int unsigned s = 0; s < N_SRC; s++) begin
      cnt = new[1 << K];
      tot = 0; ovf = 0;
      while (!ovf) begin
        sym = 0;
        for (int unsigned b = 0; b < K; b++) sym = (sym << 1) | int'(gen_bit(s, e + b));
        tot++;
        if (cnt[sym] == (1 << L) - 1) ovf = 1; else cnt[sym]++;
        exp_sel = new[e + K + 1](exp_sel);
        for (int unsigned b = 0; b <= K; b++) exp_sel[e + b] = s;
        e += K + 1;
      end
      if (tot >= best_c) begin best_c = tot; exp_best = s; end
      exp_sel = new[e + 2](exp_sel);
      exp_sel[e] = s; exp_sel[e + 1] = s;
      e += 2;
    end
    exp_cnt = best_c;
    exp_done_edge = e + 1;   // STOP at edge e, done visible after edge e+1
  endtask

  assign sample = gen_bit(int'(srcsel), edge_n);

  int sel_err;
  initial begin
    finished = 0; checks = 0; failures = 0; sel_err = 0;
    en = 0; edge_n = 0;
    run_model();
    repeat (3) @(posedge clk);
    #1;
    // Start a scan, abort it part way, then run a full scan: the abort
    // checks that en low clears the selector.
    en = 1;
    repeat (37) @(posedge clk);
    #1 en = 0;
    @(posedge clk);
    #1;
    checks++;
    if (done || srcsel != 0 || best_cnt != 0) begin
      failures++;
      $display("FAIL N=%0d K=%0d L=%0d: en low did not clear the selector", N_SRC, K, L);
    end
    en = 1; edge_n = 0;
    forever begin
      @(posedge clk);
      #1;
      edge_n++;
      if (edge_n < exp_sel.size() && srcsel != SW'(exp_sel[edge_n])) sel_err++;
      if (done) break;
    end
    checks++;
    if (sel_err != 0) begin
      failures++;
      $display("FAIL N=%0d K=%0d L=%0d: source sequence wrong at %0d edges", N_SRC, K, L, sel_err);
    end
    checks++;
    if (edge_n != exp_done_edge) begin
      failures++;
      $display("FAIL N=%0d K=%0d L=%0d: done after %0d edges, expected %0d", N_SRC, K, L, edge_n, exp_done_edge);
    end
    checks++;
    if (best_src != SW'(exp_best) || best_cnt != (K+L)'(exp_cnt)) begin
      failures++;
      $display("FAIL N=%0d K=%0d L=%0d: best %0d/%0d, expected %0d/%0d", N_SRC, K, L, best_src, best_cnt, exp_best, exp_cnt);
    end
    // done and the result hold while en stays high.
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (!done || best_src != SW'(exp_best)) begin
      failures++;
      $display("FAIL N=%0d K=%0d L=%0d: result not held", N_SRC, K, L);
    end
    $display("mwces N=%0d K=%0d L=%0d: best source %0d, count %0d, %0d cycles",
             N_SRC, K, L, best_src, best_cnt, edge_n);
    finished = 1;
  end
endmodule
