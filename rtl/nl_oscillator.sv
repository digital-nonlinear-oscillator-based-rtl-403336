// nl_oscillator -- BEHAVIOURAL MODEL, not synthesizable logic.
//
// The forced nonlinear oscillator at the heart of the digital nonlinear
// oscillator (DNO): three XOR-type gates whose outputs x, y, z feed back on
// each other in two loops that meet in a three-input XOR, driven by an
// external excitation phi. On an FPGA each gate is one LUT and the circuit
// is an asynchronous loop whose analog behaviour (finite rise times,
// routing delays, noise) produces periodic or chaotic dynamics; no clocked
// description can reproduce that, so this model only captures its event
// behaviour for simulation.
//
// Gate equations (the exact wiring is this model's choice; the published
// description gives three XOR/XNOR gates in loops joined through an XOR3):
//   x = XNOR(z, phi)        forced gate
//   y = XNOR(x, z)          second loop
//   z = XOR3(x, y, phi)     output gate joining the two loops
// With phi = 0 the loops have no fixed point and oscillate on their own;
// with phi = 1 they can rest, so the excitation alternately releases and
// holds the oscillation, which gives the forced, phase-jittered output.
//
// Each gate is modelled with an inertial delay: after any input change the
// gate waits its delay, then takes the value its inputs have at that time,
// so pulses shorter than the delay are swallowed and the event rate stays
// bounded. Every delay is a base value spread per instance by SEED (process
// variation) plus a fresh random jitter of up to JITTER_NS at each event
// (electronic noise). Delays are in ns.
//
// Ports: phi (excitation in), z (oscillator output, asynchronous).
module nl_oscillator
  import trng_pkg::*;
#(
  parameter real         GATE_NS   = 0.30,  // nominal LUT + routing delay
  parameter real         SPREAD_NS = 0.06,  // per-gate, per-instance spread
  parameter real         JITTER_NS = 0.004, // per-event random jitter
  parameter int unsigned SEED      = 1
) (
  input  logic phi,
  output logic z
);

  logic x, y;
  real  d [3];

  function automatic real jit();
    return JITTER_NS * real'($urandom % 1001) / 1000.0;
  endfunction

  initial begin
    for (int i = 0; i < 3; i++)
      d[i] = GATE_NS + SPREAD_NS * real'(mix32(SEED * 32'd3 + 32'(i)) % 1000) / 1000.0;
    x = 1'b0;
    y = 1'b1;
    z = 1'b0;
  end

  always begin
    #(d[0] + jit());
    x = ~(z ^ phi);
    @(z or phi);
  end

  always begin
    #(d[1] + jit());
    y = ~(x ^ z);
    @(x or z);
  end

  always begin
    #(d[2] + jit());
    z = x ^ y ^ phi;
    @(x or y or phi);
  end

endmodule
