// afpbp_weight_logic: one adaptive four-state weight (AFPBP encoding).
//
// A weight is 2m+2 bits: a 2-bit state and a 2m-bit payload. In state 0 the
// payload holds two m-bit weights, WT (upper half) and WNT (lower half), used
// exactly as in the separated-weights predictor. In states 1..3 the whole
// payload is one 2m-bit weight W:
//   state 0  contribution WT if h=taken, WNT if h=not-taken
//   state 1  perceptron: +W if taken history, -W if not-taken
//   state 2  taken-only: +W if taken history, 0 otherwise
//   state 3  not-taken-only: +W if not-taken history, 0 otherwise
// Training (when the predictor trains): in state 0 the selected weight steps
// +1 on a taken outcome, -1 on not-taken. If that step would leave the m-bit
// range [-2^(m-1), 2^(m-1)-1], the other weight decides the new state:
//   other has the same sign with magnitude above thw  -> stay, saturate
//   other has the opposite sign beyond thw            -> state 1
//   other within [-thw-1, thw]                        -> state 2 (WT left) or 3 (WNT left)
// In states 1..3 W steps toward the outcome (state 1: +1 when history and
// outcome agree; states 2/3: +1 on taken, only when the history bit is the
// one the state keeps) and saturates at the 2m-bit limits. When W falls back
// into the m-bit range the weight returns to state 0 with WT=W, WNT=-W
// (state 1), WT=W, WNT=0 (state 2) or WNT=W, WT=0 (state 3).
// The states, ranges, switch conditions and write-back values follow the
// encoding's state table. This design's choices: the payload layout, the
// threshold THW=3, the value W takes on entering state 1..3 (the weight that
// crossed the limit, negated for state 1 when it was WNT), zero for the
// weight the table does not name on return, clamping -W to 2^(m-1)-1 when
// W = -2^(m-1), and no training of the ignored history polarity in states 2/3.
// Purely combinational.
module afpbp_weight_logic
  import bp_pkg::*;
#(
  parameter int M   = 4,
  parameter int THW = 3
) (
  input  logic [1:0]        st_in,    // state code of the stored weight
  input  logic [2*M-1:0]    pl_in,    // payload of the stored weight
  input  logic              hist,     // history bit of this position (1 = taken)
  input  logic              taken,    // branch outcome (for the trained value)
  output logic signed [2*M:0] contrib, // contribution to the sum
  output logic [1:0]        st_next,  // state after one training step
  output logic [2*M-1:0]    pl_next   // payload after one training step
);
  localparam int SMAX = (1 << (M - 1)) - 1;     // 7 for m=4
  localparam int SMIN = -(1 << (M - 1));        // -8
  localparam int LMAX = (1 << (2 * M - 1)) - 1; // 127
  localparam int LMIN = -(1 << (2 * M - 1));    // -128

  int wt, wnt, w, x, o, wn;
  afpbp_state_e st;

  function automatic logic [M-1:0] half_w(input int v);
    return M'(v);
  endfunction

  always_comb begin
    st  = afpbp_state_e'(st_in);
    wt  = int'($signed(pl_in[2*M-1:M]));
    wnt = int'($signed(pl_in[M-1:0]));
    w   = int'($signed(pl_in));

    // ---------------- prediction contribution ----------------
    unique case (st)
      ST_SWP:      contrib = (2*M+1)'(hist ? wt : wnt);
      ST_PERC:     contrib = (2*M+1)'(hist ? w : -w);
      ST_TAKEN:    contrib = (2*M+1)'(hist ? w : 0);
      default:     contrib = (2*M+1)'(hist ? 0 : w);
    endcase

    // ---------------- training step ----------------
    st_next = st_in;
    pl_next = pl_in;
    x  = 0;
    o  = 0;
    wn = 0;
    unique case (st)
      ST_SWP: begin
        x = (hist ? wt : wnt) + (taken ? 1 : -1);
        o = hist ? wnt : wt;
        if (x <= SMAX && x >= SMIN) begin
          pl_next = hist ? {half_w(x), half_w(wnt)} : {half_w(wt), half_w(x)};
        end else if ((x > SMAX && o > THW) || (x < SMIN && o < -THW - 1)) begin
          pl_next = pl_in; // same polarity, both strong: saturate in state 0
        end else if ((x > SMAX && o < -THW - 1) || (x < SMIN && o > THW)) begin
          st_next = ST_PERC;
          pl_next = (2*M)'(hist ? x : -x);
        end else begin
          st_next = hist ? ST_TAKEN : ST_NOTTAKEN;
          pl_next = (2*M)'(x);
        end
      end
      ST_PERC: begin
        wn = w + ((taken == hist) ? 1 : -1);
        if (wn > LMAX) wn = LMAX;
        if (wn < LMIN) wn = LMIN;
        if (wn <= SMAX && wn >= SMIN) begin
          st_next = ST_SWP;
          pl_next = {half_w(wn), half_w((-wn > SMAX) ? SMAX : -wn)};
        end else begin
          pl_next = (2*M)'(wn);
        end
      end
      ST_TAKEN, ST_NOTTAKEN: begin
        if (hist == (st == ST_TAKEN)) begin
          wn = w + (taken ? 1 : -1);
          if (wn > LMAX) wn = LMAX;
          if (wn < LMIN) wn = LMIN;
          if (wn <= SMAX && wn >= SMIN) begin
            st_next = ST_SWP;
            pl_next = (st == ST_TAKEN) ? {half_w(wn), half_w(0)} : {half_w(0), half_w(wn)};
          end else begin
            pl_next = (2*M)'(wn);
          end
        end
      end
    endcase
  end
endmodule
