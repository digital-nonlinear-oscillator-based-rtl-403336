// dno_c -- BEHAVIOURAL MODEL, not synthesizable logic.
//
// Fixed digital nonlinear oscillator: the forced nonlinear oscillator
// (nl_oscillator) excited by a free-running three-stage ring oscillator
// (ring_oscillator). On the FPGA it takes six LUTs in two slices of one
// CLB, plus one buffer LUT and one flip-flop for sampling (sync_sampler).
// Two such instances are paired by xor_combiner for the 2:1 compression.
//
// Ports: z (asynchronous oscillator output). SEED sets this instance's delay
// spread, i.e. which placement it stands for.
module dno_c #(
  parameter int unsigned SEED = 1
) (
  output logic z
);

  logic phi;

  ring_oscillator #(.SEED(SEED))      u_ring (.phi(phi));
  nl_oscillator   #(.SEED(SEED + 29)) u_osc  (.phi(phi), .z(z));

endmodule
