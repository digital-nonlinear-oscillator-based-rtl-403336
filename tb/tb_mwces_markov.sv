// tb_mwces_markov: the selector on groups of two-state Markov-chain sources,
// at the selector size tuned for them (N = 10 sources, K = 2, L = 9).
//
// Each source emits one bit per clock from a two-state Markov chain: from 0
// it moves to 1 with probability pi, from 1 it moves to either state with
// probability 0.5. Its stationary probabilities are P0 = 0.5 / (pi + 0.5)
// and P1 = pi / (pi + 0.5), so pi sets the bias and the correlation. As in
// the published benchmark, pi is drawn uniformly from 0.3 +- 20 % and the
// sources form M = 100 groups of 10; the selector is run once per group.
//
// Every source runs freely and is sampled only while it is selected; since a
// chain is stationary, the harness starts each source's chain from its
// stationary distribution when the scan reaches it, which is equivalent.
// Per group the testbench checks, against its own replay of the algorithm
// on the same bits: the source index at every clock edge, the edge at which
// done rises, and the winner with its count.
//
// It then scores the choice with the exact 10-bit Shannon entropy of each
// chain, H10 = h(P1) + 9 (P0 h(pi) + P1), reported per bit (ASE-10) and as
// redundancy (ASR-10 = 1 - ASE-10). Two quality checks over all groups:
//   - the mean ASE-10 of the selected sources is within 1 % of the mean of
//     the best source of each group (the error tolerance the selector's K
//     and L were chosen for);
//   - the mean ASR-10 of the selected sources closes at least half of the
//     gap between the average source and the best source.
module tb_mwces_markov;
  localparam int unsigned N_SRC = 10, K = 2, L = 9, M = 100;
  localparam int unsigned SW = $clog2(N_SRC);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          en, sample, done;
  logic [SW-1:0] srcsel, best_src;
  logic [K+L-1:0] best_cnt;
  int unsigned   edge_n;
  int            checks = 0, failures = 0;

  mwces #(.N_SRC(N_SRC), .K(K), .L(L)) dut (
    .clk(clk), .en(en), .sample_i(sample), .srcsel_o(srcsel),
    .best_src_o(best_src), .best_cnt_o(best_cnt), .done_o(done));

  // Bits and source index the replay expects at each edge of the scan.
  bit          exp_bit [];
  int unsigned exp_sel [];
  int unsigned exp_best, exp_cnt, exp_done_edge;
  real         pi_s [N_SRC];

  function automatic real urand();
    return real'($urandom()) / 4294967296.0;
  endfunction

  function automatic real h2(real p);
    if (p <= 0.0 || p >= 1.0) return 0.0;
    return -p * $ln(p) / $ln(2.0) - (1.0 - p) * $ln(1.0 - p) / $ln(2.0);
  endfunction

  // Exact 10-bit entropy per bit of a stationary chain.
  function automatic real ase10(real p);
    real p0, p1;
    p0 = 0.5 / (p + 0.5);
    p1 = p / (p + 0.5);
    return (h2(p1) + 9.0 * (p0 * h2(p) + p1)) / 10.0;
  endfunction

  // Replays the selection on freshly generated chains, recording the bit
  // and the source for every edge.
  task automatic run_model();
    int unsigned e, best_c, tot, sym, cnt [];
    bit ovf, st;
    exp_bit = new[0];
    exp_sel = new[0];
    e = 0; best_c = 0; exp_best = 0;
    for (int unsigned s = 0; s < N_SRC; s++) begin
      cnt = new[1 << K];
      tot = 0; ovf = 0;
      st = urand() < pi_s[s] / (pi_s[s] + 0.5);
      while (!ovf) begin
        exp_bit = new[e + K + 3](exp_bit);
        exp_sel = new[e + K + 3](exp_sel);
        sym = 0;
        for (int unsigned b = 0; b <= K; b++) begin
          // The sampled bit at edge e + b; the source keeps running on the
          // count edge too.
          exp_bit[e + b] = st;
          exp_sel[e + b] = s;
          if (b < K) sym = (sym << 1) | int'(st);
          st = st ? (urand() < 0.5) : (urand() < pi_s[s]);
        end
        tot++;
        if (cnt[sym] == (1 << L) - 1) ovf = 1; else cnt[sym]++;
        e += K + 1;
      end
      if (tot >= best_c) begin best_c = tot; exp_best = s; end
      exp_bit[e] = st; exp_sel[e] = s;
      st = st ? (urand() < 0.5) : (urand() < pi_s[s]);
      exp_bit[e + 1] = st; exp_sel[e + 1] = s;
      e += 2;
    end
    exp_cnt = best_c;
    exp_done_edge = e + 1;
  endtask

  // A source not selected by the replay offers a constant 0, so a wrong
  // source index also corrupts the bits the selector sees.
  assign sample = (edge_n < exp_bit.size() && srcsel == SW'(exp_sel[edge_n]))
                  ? exp_bit[edge_n] : 1'b0;

  real sum_sel, sum_best, sum_all, a, a_best;
  int  n_exact, sel_err;

  initial begin
    en = 0; edge_n = 0;
    sum_sel = 0.0; sum_best = 0.0; sum_all = 0.0; n_exact = 0;
    for (int g = 0; g < M; g++) begin
      a_best = 0.0;
      for (int s = 0; s < N_SRC; s++) begin
        pi_s[s] = 0.3 * (1.0 + 0.2 * (2.0 * urand() - 1.0));
        a = ase10(pi_s[s]);
        sum_all += a / N_SRC;
        if (a > a_best) a_best = a;
      end
      sum_best += a_best;
      run_model();
      @(posedge clk);
      #1 en = 0;
      @(posedge clk);
      #1 en = 1; edge_n = 0; sel_err = 0;
      forever begin
        @(posedge clk);
        #1;
        edge_n++;
        if (edge_n < exp_sel.size() && srcsel != SW'(exp_sel[edge_n])) sel_err++;
        if (done || edge_n > exp_done_edge + 10) break;
      end
      checks += 3;
      if (sel_err != 0) begin
        failures++;
        $display("FAIL group %0d: source index wrong at %0d edges", g, sel_err);
      end
      if (edge_n != exp_done_edge) begin
        failures++;
        $display("FAIL group %0d: done after %0d edges, expected %0d", g, edge_n, exp_done_edge);
      end
      if (best_src != SW'(exp_best) || best_cnt != (K+L)'(exp_cnt)) begin
        failures++;
        $display("FAIL group %0d: best %0d/%0d, expected %0d/%0d", g, best_src, best_cnt, exp_best, exp_cnt);
      end
      a = ase10(pi_s[best_src]);
      sum_sel += a;
      if (a == a_best) n_exact++;
    end
    sum_sel /= M; sum_best /= M; sum_all /= M;
    $display("ASE-10 mean: all %0.4f, best %0.4f, selected %0.4f; best chosen in %0d of %0d groups",
             sum_all, sum_best, sum_sel, n_exact, M);
    $display("ASR-10 mean: all %0.4f, best %0.4f, selected %0.4f",
             1.0 - sum_all, 1.0 - sum_best, 1.0 - sum_sel);
    checks++;
    if ((sum_best - sum_sel) / sum_best > 0.01) begin
      failures++;
      $display("FAIL: selected sources lose more than 1 %% of the best mean entropy");
    end
    checks++;
    if ((1.0 - sum_sel) - (1.0 - sum_best) > 0.5 * ((1.0 - sum_all) - (1.0 - sum_best))) begin
      failures++;
      $display("FAIL: selection closes less than half of the redundancy gap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    $display("watchdog: selector did not finish all groups");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
