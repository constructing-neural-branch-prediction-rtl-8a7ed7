// dyn_threshold: adaptive training threshold for a perceptron predictor.
//
// The predictor trains when it mispredicts or when the magnitude of its sum
// does not exceed theta. This block adjusts theta so that the two kinds of
// training events stay balanced: a saturating counter TC counts up on every
// misprediction and down on every training event caused only by low
// confidence. When TC reaches its maximum, theta is raised by one and TC is
// cleared; when it reaches its minimum, theta is lowered by one and TC is
// cleared. This is the well-known threshold-fitting rule for perceptron
// predictors; the source only names "dynamic threshold", so the counter width
// (TC_BITS) and the starting value THETA_INIT = floor(1.93*h + 14) are this
// design's choices. theta never drops below 0 or exceeds its width.
// Timing: mispredict/low_conf are sampled at the rising clock edge; theta is
// a register.
module dyn_threshold #(
  parameter int THETA_BITS = 9,
  parameter int THETA_INIT = 137,
  parameter int TC_BITS    = 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  mispredict, // trained because of a misprediction
  input  logic                  low_conf,   // trained only because |sum| <= theta
  output logic [THETA_BITS-1:0] theta
);
  localparam int TC_MAX = (1 << (TC_BITS - 1)) - 1;
  localparam int TC_MIN = -(1 << (TC_BITS - 1));
  localparam int TH_MAX = (1 << THETA_BITS) - 1;

  logic signed [TC_BITS-1:0] tc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      theta <= THETA_BITS'(THETA_INIT);
      tc    <= '0;
    end else if (mispredict) begin
      if (int'(tc) == TC_MAX) begin
        tc <= '0;
        if (int'(theta) < TH_MAX) theta <= theta + 1'b1;
      end else begin
        tc <= tc + 1'b1;
      end
    end else if (low_conf) begin
      if (int'(tc) == TC_MIN) begin
        tc <= '0;
        if (theta != '0) theta <= theta - 1'b1;
      end else begin
        tc <= tc - 1'b1;
      end
    end
  end
endmodule
