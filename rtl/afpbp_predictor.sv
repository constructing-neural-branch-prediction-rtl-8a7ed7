// afpbp_predictor: adaptive four-state perceptron branch predictor (AFPBP).
//
// Same organisation as the separated-weights predictor, but every history
// position stores one (2m+2)-bit adaptive weight instead of a WT/WNT pair:
// the weight starts as two m-bit separated weights and, once training shows
// which kind of correlation the position has, turns into one 2m-bit
// perceptron, taken-only or not-taken-only weight (see afpbp_weight_logic).
// Storage is therefore 2m+2 bits per weight, 25% above a 2m-bit perceptron.
// Prediction: sum = bias W0[pc] + the contributions of all HIST positions,
// each row chosen by pc XOR the address of the i-th most recent branch;
// predict taken when the sum is >= 0. Training happens on a misprediction or
// when |sum| <= theta (adaptive threshold), and updates every selected
// weight and the bias.
// Interface and timing: identical to swp_predictor. br_pc with br_valid gives
// pred_taken/pred_sum combinationally; br_taken is the same branch's outcome
// and training and the history shift occur at the rising clock edge.
// sel_state shows the state code of every weight read this cycle.
// From the encoding: m=4, the four states and their transitions. This
// design's choices: HIST=40 (the longest history length of the comparison),
// 256 rows, an 8-bit bias weight, path-XOR indexing and the adaptive
// threshold borrowed from the separated-weights design, and THW=3.
module afpbp_predictor #(
  parameter int HIST       = 40,
  parameter int M          = 4,
  parameter int THW        = 3,
  parameter int IDX_BITS   = 8,
  parameter int PC_BITS    = 32,
  parameter int SUMW       = 16,
  parameter int THETA_BITS = 9,
  parameter int THETA_INIT = (193 * HIST) / 100 + 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   br_valid,
  input  logic [PC_BITS-1:0]     br_pc,
  input  logic                   br_taken,
  output logic                   pred_taken,
  output logic signed [SUMW-1:0] pred_sum,
  output logic [THETA_BITS-1:0]  theta,
  output logic                   trained,
  output logic [HIST-1:0][1:0]   sel_state  // state code of each selected weight
);
  localparam int NT = HIST + 1;

  logic [HIST-1:0]               ghr;
  logic [HIST-1:0][IDX_BITS-1:0] path;
  logic [NT-1:0][2*M:0]          terms;
  logic                          mispredict;
  logic                          low_conf;

  bp_history #(.GHL(HIST), .IDX_BITS(IDX_BITS)) u_hist (
    .clk, .rst_n, .upd(br_valid), .taken(br_taken), .pc(br_pc[IDX_BITS-1:0]), .ghr, .path
  );

  perceptron_column #(.WBITS(2 * M), .IDX_BITS(IDX_BITS)) u_bias (
    .clk, .rst_n, .idx(br_pc[IDX_BITS-1:0]), .hist(1'b1), .contrib(terms[HIST]),
    .train(trained), .taken(br_taken)
  );

  for (genvar i = 0; i < HIST; i++) begin : g_col
    logic [IDX_BITS-1:0] idx;
    bp_index_hash #(.IDX_BITS(IDX_BITS)) u_hash (
      .pc(br_pc[IDX_BITS-1:0]), .path_addr(path[i]), .idx
    );
    afpbp_column #(.M(M), .THW(THW), .IDX_BITS(IDX_BITS)) u_col (
      .clk, .rst_n, .idx, .hist(ghr[i]), .contrib(terms[i]), .state(sel_state[i]),
      .train(trained), .taken(br_taken)
    );
  end

  bp_adder_tree #(.N(NT), .IN_W(2 * M + 1), .SUMW(SUMW)) u_sum (.terms, .sum(pred_sum));

  always_comb begin
    pred_taken = (pred_sum >= 0);
    mispredict = br_valid && (pred_taken != br_taken);
    low_conf   = br_valid && !mispredict
                 && ((pred_sum < 0 ? -int'(pred_sum) : int'(pred_sum)) <= int'(theta));
    trained    = mispredict || low_conf;
  end

  dyn_threshold #(.THETA_BITS(THETA_BITS), .THETA_INIT(THETA_INIT)) u_theta (
    .clk, .rst_n, .mispredict, .low_conf, .theta
  );

  // Training only ever follows a presented branch, and a misprediction
  // always trains.
  a_train_needs_branch: assert property (@(posedge clk) disable iff (!rst_n) trained |-> br_valid);
  a_misp_trains:        assert property (@(posedge clk) disable iff (!rst_n)
                                         (br_valid && pred_taken != br_taken) |-> trained);
endmodule
