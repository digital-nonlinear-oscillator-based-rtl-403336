// tunable_dno -- BEHAVIOURAL MODEL, not synthesizable logic.
//
// Tunable digital nonlinear oscillator: the forced nonlinear oscillator
// (nl_oscillator) excited by the frequency-programmable NMUX ring
// (nmux_ring) instead of a fixed ring oscillator. The 6-bit sel picks one of
// 64 excitation frequencies, and with it one of 64 different dynamical
// systems, each usable as an entropy source; which one gives the most
// entropy depends on the routing delays of the particular placement, so it
// is found at run time by the entropy selector. On the FPGA the whole
// circuit is six LUT gates in one CLB (three NMUXes, three XOR/XNOR gates);
// the buffer LUT and flip-flop that sample z are in sync_sampler.
//
// Ports: sel (configuration), z (asynchronous oscillator output). SEED sets
// this instance's delay spread, i.e. which placement it stands for.
module tunable_dno #(
  parameter int unsigned SEED = 1
) (
  input  logic [5:0] sel,
  output logic       z
);

  logic phi;

  nmux_ring     #(.SEED(SEED))      u_ring (.sel(sel), .phi(phi));
  nl_oscillator #(.SEED(SEED + 17)) u_osc  (.phi(phi), .z(z));

endmodule
