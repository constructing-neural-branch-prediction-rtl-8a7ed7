// swp_predictor: perceptron branch predictor with separated Taken/Not-taken
// weights on the most recent history (partially separated SWP).
//
// Prediction: the sum starts from the bias weight W0[pc]. For each of the GHL
// history positions i, a row is chosen by hash(pc, HA[i]) = pc XOR the
// address of the i-th most recent branch. The H0 most recent positions own a
// pair of tables (WT, WNT) and add WT when their history bit is taken and
// WNT when it is not; the older positions H0+1..GHL share the single-table
// perceptron form and add +W or -W. The branch is predicted taken when the
// sum is >= 0.
// Training: when the prediction is wrong or |sum| <= theta, every selected
// weight moves one step toward the outcome (separated weights: +1 on taken,
// -1 on not-taken; single weights: +1 when history and outcome agree, -1
// otherwise; bias: +1 on taken, -1 on not-taken). theta comes from the
// adaptive threshold block. Afterwards the outcome and address enter the
// global and path histories.
// Interface and timing: one branch per cycle. br_pc is presented with
// br_valid; pred_taken/pred_sum answer combinationally in the same cycle.
// br_taken is the resolved outcome of that same branch (trace-driven,
// immediately updated operation as in the championship framework), and the
// training plus history shift happen at the closing rising clock edge.
// Follows the document: the WT/WNT selection, the partial separation with
// GHL=64 and H0=20, PC XOR path indexing, the training rule and the use of a
// dynamic threshold. This design's choices: NROWS=256 rows per column, 7-bit
// weights (the largest evaluated width), bias training, a |sum| <= theta
// training test, and saturating weights.
module swp_predictor #(
  parameter int GHL        = 64,
  parameter int H0         = 20,
  parameter int WBITS      = 7,
  parameter int IDX_BITS   = 8,
  parameter int PC_BITS    = 32,
  parameter int SUMW       = 16,
  parameter int THETA_BITS = 9,
  parameter int THETA_INIT = (193 * GHL) / 100 + 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   br_valid,   // a conditional branch this cycle
  input  logic [PC_BITS-1:0]     br_pc,      // its address
  input  logic                   br_taken,   // its resolved outcome (for training)
  output logic                   pred_taken, // prediction for br_pc
  output logic signed [SUMW-1:0] pred_sum,   // perceptron output (confidence)
  output logic [THETA_BITS-1:0]  theta,      // current training threshold
  output logic                   trained     // training step applied this cycle
);
  localparam int NT = GHL + 1; // history terms plus bias

  logic [GHL-1:0]               ghr;
  logic [GHL-1:0][IDX_BITS-1:0] path;
  logic [NT-1:0][WBITS:0]       terms;
  logic                         mispredict;
  logic                         low_conf;

  bp_history #(.GHL(GHL), .IDX_BITS(IDX_BITS)) u_hist (
    .clk, .rst_n, .upd(br_valid), .taken(br_taken), .pc(br_pc[IDX_BITS-1:0]), .ghr, .path
  );

  // Bias weight W0, indexed by the branch address only.
  perceptron_column #(.WBITS(WBITS), .IDX_BITS(IDX_BITS)) u_bias (
    .clk, .rst_n, .idx(br_pc[IDX_BITS-1:0]), .hist(1'b1), .contrib(terms[GHL]),
    .train(trained), .taken(br_taken)
  );

  for (genvar i = 0; i < GHL; i++) begin : g_col
    logic [IDX_BITS-1:0] idx;
    bp_index_hash #(.IDX_BITS(IDX_BITS)) u_hash (
      .pc(br_pc[IDX_BITS-1:0]), .path_addr(path[i]), .idx
    );
    if (i < H0) begin : g_sep
      logic signed [WBITS-1:0] w;
      swp_sep_column #(.WBITS(WBITS), .IDX_BITS(IDX_BITS)) u_col (
        .clk, .rst_n, .idx, .hist(ghr[i]), .weight(w), .train(trained), .taken(br_taken)
      );
      assign terms[i] = (WBITS + 1)'(w);
    end else begin : g_single
      perceptron_column #(.WBITS(WBITS), .IDX_BITS(IDX_BITS)) u_col (
        .clk, .rst_n, .idx, .hist(ghr[i]), .contrib(terms[i]), .train(trained), .taken(br_taken)
      );
    end
  end

  bp_adder_tree #(.N(NT), .IN_W(WBITS + 1), .SUMW(SUMW)) u_sum (.terms, .sum(pred_sum));

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
