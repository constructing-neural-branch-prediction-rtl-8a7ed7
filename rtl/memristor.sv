// memristor: BEHAVIOURAL MODEL of one titanium-dioxide memristor with its
// series rectifier (not synthesizable; real-valued).
//
// The device has a plus and a minus terminal; v is the voltage from plus to
// minus and i the resulting current from the fitted law in memristor_pkg.
// Its internal state w (0.05..0.95, higher = lower resistance) is the stored
// analog weight. Programming is modelled in discrete steps: at each rising
// edge of prog, a voltage above +V_PROG across the device turns it on by
// STEP_ON and a voltage below -V_PROG turns it off by STEP_OFF, clamped to
// [lmin, lmax]. Turning on is slower than turning off (STEP_ON < STEP_OFF),
// the asymmetry the device is known for. The step sizes, V_PROG and the
// discrete-step form are this model's choices: the continuous state equation
// of the device is not reproduced, and read disturb is not modelled (prog is
// only pulsed by the update circuit).
module memristor
  import memristor_pkg::*;
#(
  parameter real W_INIT   = 0.5,
  parameter real STEP_ON  = 0.075,
  parameter real STEP_OFF = 0.1,
  parameter real V_PROG   = 0.5
) (
  input  real  v,     // voltage across the device, plus minus minus
  input  logic prog,  // programming strobe: one step per rising edge
  output real  i,     // device current (A)
  output real  w      // internal state
);
  real state;

  initial state = W_INIT;

  always @(posedge prog) begin
    if (v > V_PROG)       state <= (state + STEP_ON  > LMAX) ? LMAX : state + STEP_ON;
    else if (v < -V_PROG) state <= (state - STEP_OFF < LMIN) ? LMIN : state - STEP_OFF;
  end

  always_comb begin
    w = state;
    i = mem_current(state, v);
  end
endmodule
