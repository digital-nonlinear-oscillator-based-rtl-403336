// mwces: Maximum Worst-Case Entropy Selector.
//
// Finds, among N_SRC entropy sources, the one whose most probable K-bit
// symbol has the lowest probability p_H, i.e. the highest worst-case
// (min-)entropy. Sources are examined one after the other. For the source
// under test, K consecutive sampled bits are shifted into a symbol; the
// symbol's occurrence counter (one L-bit counter per symbol, 2^K of them)
// and a total counter are incremented. When a symbol counter would reach
// 2^L, all symbol counters are cleared and the total count, i.e. the number
// of symbols it took to reach the overflow, is compared with the best so
// far. The source that needed the most symbols wins. Ties go to the later
// source (the comparison is "greater or equal"), as in the hardware
// description this follows; the plain algorithm listing uses "greater".
//
// Interface
//   en        : low holds the selector cleared (synchronous); a rising en
//               starts one complete scan of all sources.
//   sample_i  : current sampled bit of the source selected by srcsel_o. The
//               selector does not mux the sources itself: srcsel_o can drive
//               either a multiplexer over parallel sources or the
//               configuration input of one tunable oscillator.
//   best_src_o: index of the winning source, valid when done_o is high.
//   best_cnt_o: its symbol count (the estimate of 2^L / p_H).
//
// Timing: each symbol takes K + 1 cycles (K shift cycles, one count cycle);
// each source adds 2 cycles (time check, source update); done_o rises one
// cycle after the last update and stays high while en is high. A source
// therefore takes (K + 1) * T_i + 2 cycles, where T_i is its total count,
// and T_i lies between 2^L and 2^K * (2^L - 1) + 1.
//
// The state sequence, counter widths and clear behaviour follow the
// published selector; the separate srcsel_o/sample_i interface, the
// best_cnt_o output and the parameterised source count are this design's.
module mwces
  import trng_pkg::*;
#(
  parameter int unsigned N_SRC = 64,  // sources compared (64 = tunable DNO configurations)
  parameter int unsigned K     = 3,   // symbol length in bits
  parameter int unsigned L     = 8,   // overflow threshold is 2^L
  localparam int unsigned SW   = (N_SRC > 1) ? $clog2(N_SRC) : 1,
  localparam int unsigned CW   = K + L
) (
  input  logic          clk,
  input  logic          en,
  input  logic          sample_i,
  output logic [SW-1:0] srcsel_o,
  output logic [SW-1:0] best_src_o,
  output logic [CW-1:0] best_cnt_o,
  output logic          done_o
);

  localparam int unsigned NSYM = 1 << K;
  localparam logic [L-1:0] SYM_MAX = '1;         // 2^L - 1
  localparam logic [SW-1:0] LAST_SRC = SW'(N_SRC - 1);

  mwces_state_t   state;
  logic [K-1:0]   symbol;
  logic [L-1:0]   symcnt [NSYM];
  logic [CW-1:0]  totcnt;
  logic [CW-1:0]  bestcnt;
  logic [SW-1:0]  bestpart;
  logic [SW-1:0]  srcsel;
  logic [$clog2(K+1)-1:0] bitcnt;

  always_ff @(posedge clk) begin
    if (!en) begin
      state      <= ST_BUILDSYM;
      srcsel     <= '0;
      bitcnt     <= '0;
      symbol     <= '0;
      totcnt     <= '0;
      bestcnt    <= '0;
      bestpart   <= '0;
      best_src_o <= '0;
      done_o     <= 1'b0;
      for (int i = 0; i < NSYM; i++) symcnt[i] <= '0;
    end else begin
      unique case (state)
        ST_BUILDSYM: begin
          symbol <= K'({symbol, sample_i});
          if (bitcnt == ($bits(bitcnt))'(K - 1)) begin
            bitcnt <= '0;
            state  <= ST_COUNTSYM;
          end else begin
            bitcnt <= bitcnt + 1'b1;
          end
        end
        ST_COUNTSYM: begin
          totcnt <= totcnt + 1'b1;
          if (symcnt[symbol] == SYM_MAX) begin
            for (int i = 0; i < NSYM; i++) symcnt[i] <= '0;
            state <= ST_CHECKTIME;
          end else begin
            symcnt[symbol] <= symcnt[symbol] + 1'b1;
            state          <= ST_BUILDSYM;
          end
        end
        ST_CHECKTIME: begin
          if (totcnt >= bestcnt) begin
            bestcnt  <= totcnt;
            bestpart <= srcsel;
          end
          totcnt <= '0;
          state  <= ST_UPDATESRC;
        end
        ST_UPDATESRC: begin
          if (srcsel == LAST_SRC) begin
            srcsel     <= '0;
            best_src_o <= bestpart;
            state      <= ST_STOP;
          end else begin
            srcsel <= srcsel + 1'b1;
            state  <= ST_BUILDSYM;
          end
        end
        ST_STOP: done_o <= 1'b1;
        default: state <= ST_STOP;
      endcase
    end
  end

  assign srcsel_o   = srcsel;
  assign best_cnt_o = bestcnt;

  // The source index never leaves the range of compared sources, and once
  // the scan is done it stays done until en drops.
  a_srcsel_range: assert property (@(posedge clk) disable iff (!en) srcsel <= LAST_SRC);
  a_done_sticky:  assert property (@(posedge clk) (en && done_o) |=> (!en || done_o));

endmodule
