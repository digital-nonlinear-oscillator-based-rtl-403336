// sync_sampler: synchronization interface, the 1-bit A/D converter of a
// digital nonlinear oscillator.
//
// The oscillator output z is an asynchronous, analog-like waveform. It
// passes through one transparent (buffer) LUT, which squares up the signal
// and decouples the oscillator loop from the flip-flop input load, and is
// then sampled by a single D flip-flop on the rising edge of the sampling
// clock. Each clock cycle therefore yields one raw random bit.
//
// Interface: clk (sampling clock), rst_n (active-low synchronous reset of
// the bit and its valid flag), z_i (oscillator output), bit_o (sampled bit),
// valid_o (high from the first sample after reset). Latency: bit_o shows the
// value z_i had at the previous rising edge. A real implementation keeps
// the buffer from being optimised away with a keep attribute; the
// single-flip-flop structure follows the published design, the reset and
// valid flag are this design's own. The flip-flop may go metastable: the
// oscillator output is deliberately asynchronous to clk, and the sampled
// bit is consumed only as random data.
module sync_sampler (
  input  logic clk,
  input  logic rst_n,
  input  logic z_i,
  output logic bit_o,
  output logic valid_o
);

  logic z_buf;   // transparent LUT ("del" buffer)

  assign z_buf = z_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_o   <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      bit_o   <= z_buf;
      valid_o <= 1'b1;
    end
  end

endmodule
