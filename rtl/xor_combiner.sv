// xor_combiner: lossy compression by XORing parallel oscillator streams.
//
// The sampled bits of N_IN oscillator instances that run in parallel are
// XORed into one output bit per clock. With the default N_IN = 2 this is
// the 2:1 compression that pairs two identical oscillators to even out the
// spread in entropy between placements: if the two bits are independent
// with biases e1 and e2, the XOR has bias 2*e1*e2, so a weak instance is
// covered by a good one. The output is registered.
//
// Interface: valid_i (all inputs valid), bits_i (one bit per instance),
// valid_o and bit_o one cycle later; rst_n is an active-low synchronous
// reset. The pairing of two instances follows the published design; the
// general N_IN, register and valid flag are this design's own.
module xor_combiner #(
  parameter int unsigned N_IN = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  logic [N_IN-1:0] bits_i,
  output logic            valid_o,
  output logic            bit_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      bit_o   <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) bit_o <= ^bits_i;
    end
  end

endmodule
