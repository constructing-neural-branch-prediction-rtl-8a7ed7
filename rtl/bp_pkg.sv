// bp_pkg: types and helpers shared by the perceptron branch predictors.
//
// Holds the saturating +/-1 step used by every weight table, the absolute
// value used by the training rule, and the AFPBP weight record (a 2-bit state
// code plus a 2m-bit payload, Table-2 style encoding). The AFPBP state names
// follow the four states of the adaptive encoding; their binary codes 0..3 are
// the state codes the encoding gives.
package bp_pkg;

  // Four AFPBP states: 0 separated tables, 1 perceptron, 2 taken-only, 3 not-taken-only.
  typedef enum logic [1:0] {
    ST_SWP      = 2'd0,
    ST_PERC     = 2'd1,
    ST_TAKEN    = 2'd2,
    ST_NOTTAKEN = 2'd3
  } afpbp_state_e;

  // Saturating add of +1 (up=1) or -1 (up=0) to a WIDTH-bit two's complement
  // value held in the low bits of a 32-bit int.
  function automatic int sat_step(input int value, input logic up, input int width);
    int hi;
    int lo;
    hi = (1 <<< (width - 1)) - 1;
    lo = -(1 <<< (width - 1));
    if (up) return (value >= hi) ? hi : value + 1;
    else    return (value <= lo) ? lo : value - 1;
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

endpackage
