// nmux_ring -- BEHAVIOURAL MODEL, not synthesizable logic.
//
// Frequency-programmable excitation of the tunable digital nonlinear
// oscillator. Three inverting 4:1 multiplexers (NMUXes) are connected in a
// ring. The four data inputs of each NMUX are all driven by the previous
// stage, so logically the ring is a three-stage ring oscillator; physically
// each of the four wires has its own routing delay, so the two select bits
// of a stage choose one of four propagation delays. The 6-bit sel (two bits
// per stage, stage 0 in sel[1:0]) thus picks one of 4^3 = 64 oscillation
// frequencies. phi is the output of the last stage.
//
// Each path delay is the stage's base delay plus a per-instance,
// per-path spread derived from SEED (the unknown routing of a real
// placement) plus per-event jitter; stages use the inertial-delay model of
// nl_oscillator. The ring starts from a consistent state (one transition
// travelling round the ring), as a real ring settles into its fundamental
// mode. The delay values are this model's own choice; the ring structure
// and the 64 settings follow the published tunable DNO.
//
// Ports: sel (6-bit configuration, may change at any time), phi (output).
module nmux_ring
  import trng_pkg::*;
#(
  parameter real         STAGE_NS  = 0.35,  // NMUX LUT delay
  parameter real         PATH_NS   = 0.40,  // spread range of the four routing paths
  parameter real         JITTER_NS = 0.004,
  parameter int unsigned SEED      = 1
) (
  input  logic [5:0] sel,
  output logic       phi
);

  logic [2:0] m;           // stage outputs; m[2] is phi
  real        dp [3][4];   // path delay of stage s, input j

  function automatic real jit();
    return JITTER_NS * real'($urandom % 1001) / 1000.0;
  endfunction

  initial begin
    for (int s = 0; s < 3; s++)
      for (int j = 0; j < 4; j++)
        dp[s][j] = STAGE_NS + PATH_NS * real'(mix32(SEED * 32'd16 + 32'(s * 4 + j)) % 1000) / 1000.0;
    m = 3'b010;
  end

  for (genvar s = 0; s < 3; s++) begin : g_stage
    localparam int PREV = (s + 2) % 3;
    always begin
      #(dp[s][sel[2*s +: 2]] + jit());
      m[s] = ~m[PREV];
      @(m[PREV] or sel[2*s +: 2]);
    end
  end

  assign phi = m[2];

endmodule
