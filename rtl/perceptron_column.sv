// perceptron_column: one history position with a single weight table.
//
// Used for the older history positions of the partially separated predictor
// (one shared table W for positions h0+1..h) and, with hist tied to 1, for
// the per-branch bias table W0. The row given by idx is read and the
// contribution is +W when the history bit is taken and -W when it is not
// (h*W with h = +/-1). Training adds t*h, t = +1 for a taken outcome and -1
// for a not-taken one: the weight grows when outcome and history agree and
// shrinks when they differ, saturating at the WBITS limits. The contribution
// is one bit wider than the weight so that -(-2^(WBITS-1)) is exact.
// Weights reset to zero (this design's choice).
// Timing: combinational read, update at the rising clock edge.
module perceptron_column
  import bp_pkg::*;
#(
  parameter int WBITS    = 7,
  parameter int IDX_BITS = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [IDX_BITS-1:0]   idx,
  input  logic                  hist,    // 1 = taken history, contributes +W
  output logic signed [WBITS:0] contrib, // h*W
  input  logic                  train,
  input  logic                  taken
);
  localparam int NROWS = 1 << IDX_BITS;

  logic signed [WBITS-1:0] w [NROWS];
  logic signed [WBITS:0]   wext;

  always_comb begin
    wext    = (WBITS + 1)'(w[idx]);
    contrib = hist ? wext : -wext;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NROWS; r++) w[r] <= '0;
    end else if (train) begin
      // agree (taken == hist) -> +1, disagree -> -1
      w[idx] <= WBITS'(sat_step(int'(w[idx]), (taken == hist), WBITS));
    end
  end
endmodule
