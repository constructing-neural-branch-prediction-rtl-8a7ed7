// memristor_readout: BEHAVIOURAL MODEL of the summing lines, load resistors
// and differential amplifier of the memristor-based perceptron predictor.
// Not synthesizable; real-valued.
//
// All cells source their steered currents into two shared lines, Taken and
// Not-taken, each terminated to ground by R_LOAD (200 kOhm). A line voltage
// V satisfies V / R_LOAD = sum over the devices k on that line of
// I(w_k, VDD - V), a monotone equation solved here by bisection (ITER
// halvings of [0, VDD]). A device entry of -1 means "not connected". The
// differential amplifier compares the two line voltages: the prediction is
// taken when V(Taken) >= V(Not-taken), and v_diff = V(Taken) - V(Not-taken)
// is the confidence. Amplifier gain and offset are not modelled (an ideal
// comparator is this model's choice).
module memristor_readout
  import memristor_pkg::*;
#(
  parameter int N    = 1,
  parameter int ITER = 40
) (
  input  real  w_taken     [N], // device states on the Taken line
  input  real  w_not_taken [N], // device states on the Not-taken line
  output real  v_taken,
  output real  v_not_taken,
  output real  v_diff,
  output logic pred_taken
);
  function automatic real line_current(input real w[N], input real v);
    real s;
    s = 0.0;
    for (int k = 0; k < N; k++)
      if (w[k] >= 0.0) s += mem_current(w[k], VDD - v);
    return s;
  endfunction

  function automatic real solve_line(input real w[N]);
    real lo, hi, mid;
    lo = 0.0;
    hi = VDD;
    for (int n = 0; n < ITER; n++) begin
      mid = (lo + hi) / 2.0;
      if (line_current(w, mid) * R_LOAD > mid) lo = mid;
      else hi = mid;
    end
    return (lo + hi) / 2.0;
  endfunction

  always_comb begin
    v_taken     = solve_line(w_taken);
    v_not_taken = solve_line(w_not_taken);
    v_diff      = v_taken - v_not_taken;
    pred_taken  = (v_diff >= 0.0);
  end
endmodule
