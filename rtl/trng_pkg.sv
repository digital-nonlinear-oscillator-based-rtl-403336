// trng_pkg: types and constants shared by the DNO-based TRNG blocks.
//
// - mwces_state_t: the five states of the Maximum Worst-Case Entropy
//   Selector controller (symbol build, symbol count, time check, source
//   update, stop), in the order of the reference algorithm.
// - LFSR8_TAPS: feedback taps of the 8-bit Fibonacci LFSR used as the
//   minimum post-processing, polynomial x^8 + x^6 + x^5 + x^4 + 1.
//   Bit i of the mask set means stage i+1 of the shift register feeds the
//   XOR, so the mask selects stages 8, 6, 5 and 4.
// - LFSR8_SEED: non-zero reset state of that LFSR (own choice).
// - mix32: a 32-bit integer hash. The oscillator models use it to derive
//   reproducible per-instance delay spreads (their stand-in for process
//   variation) from a seed; it is not used by any synthesizable block.
package trng_pkg;

  typedef enum logic [2:0] {
    ST_BUILDSYM  = 3'd0,
    ST_COUNTSYM  = 3'd1,
    ST_CHECKTIME = 3'd2,
    ST_UPDATESRC = 3'd3,
    ST_STOP      = 3'd4
  } mwces_state_t;

  localparam logic [7:0] LFSR8_TAPS = 8'b1011_1000;
  localparam logic [7:0] LFSR8_SEED = 8'h01;

  function automatic logic [31:0] mix32(logic [31:0] v);
    logic [31:0] h;
    h = v * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return h;
  endfunction

endpackage
