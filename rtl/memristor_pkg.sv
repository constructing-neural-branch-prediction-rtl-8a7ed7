// memristor_pkg: constants and the current equation of the memristor model.
//
// Behavioural-model support only (not synthesizable logic). The device
// current is the fitted memristor-plus-rectifier law
//   I = w^n * c1 * sinh(d1*V) + c2 * (exp(d2*V) - 1)
// with n=4, c1=9, c2=0.01, d1=2, d2=4 and the state w kept in
// [lmin, lmax] = [0.05, 0.95], the published fitting constants. The current
// unit (I_UNIT, 1 uA) is this design's choice; the fit gives no unit.
// VDD = 1.0 V and the 200 kOhm line resistors are the values of the 1-bit
// circuit.
package memristor_pkg;
  localparam real N_EXP  = 4.0;
  localparam real C1     = 9.0;
  localparam real C2     = 0.01;
  localparam real D1     = 2.0;
  localparam real D2     = 4.0;
  localparam real LMIN   = 0.05;
  localparam real LMAX   = 0.95;
  localparam real I_UNIT = 1.0e-6;
  localparam real VDD    = 1.0;
  localparam real R_LOAD = 200.0e3;

  // Device current (A) for state w and voltage v (plus minus minus, V).
  function automatic real mem_current(input real w, input real v);
    return I_UNIT * ((w ** N_EXP) * C1 * $sinh(D1 * v) + C2 * ($exp(D2 * v) - 1.0));
  endfunction
endpackage
