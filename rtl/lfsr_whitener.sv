// lfsr_whitener: minimum post-processing of the raw oscillator bits.
//
// Each valid raw bit is XORed with the output of an 8-bit Fibonacci LFSR
// built on the primitive polynomial x^8 + x^6 + x^5 + x^4 + 1, which masks
// the small residual bias of the source. Stages are numbered 1 (input,
// state[0]) to 8 (output, state[7]); the feedback into stage 1 is the XOR
// of stages 8, 6, 5 and 4. The LFSR steps once per valid input bit, so its
// 255-bit period lines up with the bit stream, not with the clock.
//
// Interface: rst_n (active-low synchronous reset, loads LFSR8_SEED), valid_i
// and bit_i (raw bit stream), valid_o and bit_o (whitened stream, one cycle
// later). Throughput is one bit per cycle. The polynomial and the bitwise
// XOR follow the published post-processing; the seed, the reset and the
// valid handshake are this design's own.
module lfsr_whitener
  import trng_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  input  logic bit_i,
  output logic valid_o,
  output logic bit_o
);

  logic [7:0] state;
  logic       fb;

  assign fb = ^(state & LFSR8_TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= LFSR8_SEED;
      valid_o <= 1'b0;
      bit_o   <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        bit_o <= bit_i ^ state[7];
        state <= {state[6:0], fb};
      end
    end
  end

  // A Fibonacci LFSR that reaches the all-zero state stays there.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) state != 8'h00);

endmodule
