// swp_sep_column: one history position with separated Taken/Not-taken weights.
//
// Each row holds a weight pair (WT, WNT). For a prediction the row given by
// idx is read and a multiplexer passes WT when the history bit is taken and
// WNT when it is not taken, so only an addition is ever needed downstream and
// no weight is negated. When train is high at the clock edge, the weight that
// was selected moves one step toward the outcome: +1 for a taken branch, -1
// for a not-taken one, saturating at the WBITS two's complement limits. The
// unselected weight of the pair is left alone. All of this follows the SWP
// prediction/update algorithm; the reset of every weight to zero and the
// saturating arithmetic are this design's choices.
// Timing: read is combinational from idx/hist; the update is written at the
// rising clock edge. One access per cycle.
module swp_sep_column
  import bp_pkg::*;
#(
  parameter int WBITS    = 7,
  parameter int IDX_BITS = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [IDX_BITS-1:0]     idx,    // row of this branch
  input  logic                    hist,   // history bit of this position (1 = taken)
  output logic signed [WBITS-1:0] weight, // selected weight WT or WNT
  input  logic                    train,  // apply the training step this cycle
  input  logic                    taken   // branch outcome used for training
);
  localparam int NROWS = 1 << IDX_BITS;

  logic signed [WBITS-1:0] wt  [NROWS];
  logic signed [WBITS-1:0] wnt [NROWS];

  always_comb weight = hist ? wt[idx] : wnt[idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NROWS; r++) begin
        wt[r]  <= '0;
        wnt[r] <= '0;
      end
    end else if (train) begin
      if (hist) wt[idx]  <= WBITS'(sat_step(int'(wt[idx]),  taken, WBITS));
      else      wnt[idx] <= WBITS'(sat_step(int'(wnt[idx]), taken, WBITS));
    end
  end
endmodule
