// ring_oscillator -- BEHAVIOURAL MODEL, not synthesizable logic.
//
// Three-stage ring oscillator (three inverting LUTs in a loop) that provides
// the excitation phi of the fixed digital nonlinear oscillator. Its period
// is twice the sum of the three stage delays. Stage delays are a base value
// plus a per-instance spread from SEED and per-event jitter, with the
// inertial-delay model used by nl_oscillator. The stage count follows the
// published design (the tunable version replaces these three inverters by
// three inverting multiplexers); delay values are this model's choice.
//
// Ports: phi (output).
module ring_oscillator
  import trng_pkg::*;
#(
  parameter real         STAGE_NS  = 0.35,
  parameter real         SPREAD_NS = 0.10,
  parameter real         JITTER_NS = 0.004,
  parameter int unsigned SEED      = 1
) (
  output logic phi
);

  logic [2:0] m;
  real        d [3];

  function automatic real jit();
    return JITTER_NS * real'($urandom % 1001) / 1000.0;
  endfunction

  initial begin
    for (int s = 0; s < 3; s++)
      d[s] = STAGE_NS + SPREAD_NS * real'(mix32(SEED * 32'd7 + 32'(s)) % 1000) / 1000.0;
    m = 3'b010;
  end

  for (genvar s = 0; s < 3; s++) begin : g_stage
    localparam int PREV = (s + 2) % 3;
    always begin
      #(d[s] + jit());
      m[s] = ~m[PREV];
      @(m[PREV]);
    end
  end

  assign phi = m[2];

endmodule
