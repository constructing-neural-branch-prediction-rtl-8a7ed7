// neural_bp_top: the three neural branch predictor designs side by side.
//
//  * swp_predictor   - perceptron with separated Taken/Not-taken weights on
//                      the 20 most recent of 64 history bits (digital RTL).
//  * afpbp_predictor - perceptron whose 10-bit weights adapt between a
//                      separated pair and a single weight (digital RTL).
//  * memristor_predictor - behavioural model of the complementary-memristor
//                      perceptron circuit with current-summing readout.
// The two digital predictors share the clock and reset and each has its own
// branch port, so both can be driven with the same branch stream and
// compared. The memristor model has its own phase clock (high half predict,
// low half update) because its circuit is timed by PREDICT/UPDATE phases
// rather than by a register clock. Nothing is shared between the three; each
// port group is that block's interface, described in its own file.
module neural_bp_top #(
  parameter int PC_BITS    = 32,
  parameter int SUMW       = 16,
  parameter int THETA_BITS = 9,
  parameter int SWP_GHL    = 64,
  parameter int SWP_H0     = 20,
  parameter int SWP_WBITS  = 7,
  parameter int AFP_HIST   = 40,
  parameter int AFP_M      = 4,
  parameter int IDX_BITS   = 8,
  parameter int MEM_N_HIST = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // separated-weights predictor
  input  logic                   swp_valid,
  input  logic [PC_BITS-1:0]     swp_pc,
  input  logic                   swp_taken,
  output logic                   swp_pred,
  output logic signed [SUMW-1:0] swp_sum,
  output logic [THETA_BITS-1:0]  swp_theta,
  output logic                   swp_trained,
  // adaptive four-state predictor
  input  logic                   afp_valid,
  input  logic [PC_BITS-1:0]     afp_pc,
  input  logic                   afp_taken,
  output logic                   afp_pred,
  output logic signed [SUMW-1:0] afp_sum,
  output logic [THETA_BITS-1:0]  afp_theta,
  output logic                   afp_trained,
  output logic [AFP_HIST-1:0][1:0] afp_state,
  // memristor predictor model
  input  logic                   mem_clk,
  input  logic                   mem_valid,
  input  logic [MEM_N_HIST-1:0]  mem_history,
  input  logic                   mem_outcome,
  output logic                   mem_pred,
  output real                    mem_v_diff,
  output real                    mem_v_taken,
  output real                    mem_v_not_taken,
  output real                    mem_w_primary    [MEM_N_HIST],
  output real                    mem_w_complement [MEM_N_HIST]
);

  swp_predictor #(
    .GHL(SWP_GHL), .H0(SWP_H0), .WBITS(SWP_WBITS), .IDX_BITS(IDX_BITS),
    .PC_BITS(PC_BITS), .SUMW(SUMW), .THETA_BITS(THETA_BITS)
  ) u_swp (
    .clk, .rst_n, .br_valid(swp_valid), .br_pc(swp_pc), .br_taken(swp_taken),
    .pred_taken(swp_pred), .pred_sum(swp_sum), .theta(swp_theta), .trained(swp_trained)
  );

  afpbp_predictor #(
    .HIST(AFP_HIST), .M(AFP_M), .IDX_BITS(IDX_BITS), .PC_BITS(PC_BITS),
    .SUMW(SUMW), .THETA_BITS(THETA_BITS)
  ) u_afp (
    .clk, .rst_n, .br_valid(afp_valid), .br_pc(afp_pc), .br_taken(afp_taken),
    .pred_taken(afp_pred), .pred_sum(afp_sum), .theta(afp_theta), .trained(afp_trained),
    .sel_state(afp_state)
  );

  memristor_predictor #(.N_HIST(MEM_N_HIST)) u_mem (
    .clk(mem_clk), .valid(mem_valid), .history(mem_history), .outcome(mem_outcome),
    .pred_taken(mem_pred), .v_diff_q(mem_v_diff), .v_taken(mem_v_taken),
    .v_not_taken(mem_v_not_taken), .w_primary(mem_w_primary), .w_complement(mem_w_complement)
  );
endmodule
