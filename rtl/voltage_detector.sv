// voltage_detector: behavioural model of one domain's voltage detector.
//
// This is a model of an analog timing sensor, not synthesizable logic. Each
// of the NUNIT detection units is DFF1 -> critical-path replica -> tunable
// delay line (0..59 delay units, one unit = one buffer plus one
// transmission-gate multiplexer) -> DFF2, all clocked by the domain clock.
// A one-cycle test pulse launched by DFF1 is captured by DFF2 one clock
// later if the replica plus the selected delay fits in the clock period;
// otherwise it arrives one cycle late, which the controller sees as a
// missing pulse ("timing violation").
//
// Delay model (this model's own choice): gate delay scales with the supply as
// d(V) = d(1.0 V) * (V / (V - Vth)^2) / (1.0 / (1.0 - Vth)^2), Vth = 0.26 V.
// The replica is the core's critical path at 1.0 V (the 447-MHz maximum
// clock, 2237 ps) plus a 160-ps design margin; a delay unit is UNIT_PS at
// 1.0 V. Per-unit placement mismatch is modelled by a small fixed offset,
// and env_ps adds delay for temperature or supply-noise effects.
// The clock is fclk with a domain clock enable; the clock period is
// TCLK_PS * 2**div.
//
// Follows the published design: four units of DFF, replica, 0..59-unit
// delay line and DFF, and the 160-ps replica margin. The delay law and the
// unit delay are this model's own.
module voltage_detector #(
  parameter int  NUNIT     = 4,
  parameter real TCLK_PS   = 3333.0,  // fclk period (300 MHz)
  parameter real REPL_PS   = 2397.0,  // replica delay at 1.0 V
  parameter real UNIT_PS   = 20.0,    // one delay unit at 1.0 V
  parameter real VTH       = 0.26
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,          // domain clock enable
  input  logic [1:0]       div,         // domain clock = fclk / 2**div
  input  logic [11:0]      vdd_mv,      // present supply of the domain (mV)
  input  logic signed [11:0] env_ps,    // extra delay from the environment
  input  logic             test,        // test signal (to every DFF1)
  input  logic [5:0]       delay_sel,   // added delay units, 0..59
  output logic [NUNIT-1:0] detected     // DFF2 outputs
);

  logic [NUNIT-1:0] q1, q1_prev;

  function automatic real scale(input real v);
    real vv;
    vv = (v < VTH + 0.05) ? VTH + 0.05 : v;
    return (vv / ((vv - VTH) * (vv - VTH))) / (1.0 / ((1.0 - VTH) * (1.0 - VTH)));
  endfunction

  function automatic logic fits(input int u);
    real d, t;
    d = (REPL_PS + 8.0 * real'(u) + UNIT_PS * real'(delay_sel)) * scale(real'(vdd_mv) / 1000.0)
        + real'(env_ps);
    t = TCLK_PS * real'(1 << div);
    return d <= t;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q1       <= '0;
      q1_prev  <= '0;
      detected <= '0;
    end else if (ce) begin
      for (int u = 0; u < NUNIT; u++) begin
        q1[u]       <= test;
        q1_prev[u]  <= q1[u];
        detected[u] <= fits(u) ? q1[u] : q1_prev[u];
      end
    end

endmodule
