// memristor_predictor: BEHAVIOURAL MODEL of the memristor-based perceptron
// branch predictor: N_HIST complementary-memristor weight cells sharing a
// Taken and a Not-taken summing line, read by a differential amplifier.
// Not synthesizable; real-valued.
//
// Each clock cycle is one predict/update round. While clk is high the cells
// are in the prediction phase (PREDICT): their currents, steered by the
// history bits, are summed on the two lines and the amplifier output is
// followed by a transparent latch that closes when clk falls, so pred_taken
// and v_diff_q hold the prediction of the cycle. While clk is low the cells
// are in the update phase (UPDATE) and every weight takes one programming
// step toward the outcome: strengthened when its history bit agrees with the
// outcome, weakened when it differs. As in the 1-bit circuit, training
// happens on every branch; there is no confidence threshold.
// Interface: history, outcome and valid must be stable from one rising clk
// edge to the next. N_HIST = 1 is the circuit that was designed and
// simulated; larger N_HIST sums more cells on the same lines, which is this
// model's extension of the current-summing readout.
module memristor_predictor
  import memristor_pkg::*;
#(
  parameter int N_HIST = 1
) (
  input  logic              clk,
  input  logic              valid,        // a branch is presented this cycle
  input  logic [N_HIST-1:0] history,      // history bits, 1 = taken
  input  logic              outcome,      // resolved outcome of the branch
  output logic              pred_taken,   // prediction of this cycle (held)
  output real               v_diff_q,     // V(Taken) - V(Not-taken) of this cycle
  output real               v_taken,      // live Taken line voltage
  output real               v_not_taken,  // live Not-taken line voltage
  output real               w_primary    [N_HIST],
  output real               w_complement [N_HIST]
);
  logic PREDICT;
  logic UPDATE;
  logic pred_live;
  real  v_diff;
  real  w_t  [N_HIST];
  real  w_nt [N_HIST];
  real  i_t  [N_HIST];
  real  i_nt [N_HIST];

  assign PREDICT = valid & clk;
  assign UPDATE  = valid & ~clk;

  for (genvar k = 0; k < N_HIST; k++) begin : g_cell
    memristor_pbp_cell u_cell (
      .PREDICT, .UPDATE, .HISTORY(history[k]), .OUTCOME(outcome),
      .v_taken, .v_not_taken,
      .w_to_taken(w_t[k]), .w_to_not_taken(w_nt[k]),
      .i_taken(i_t[k]), .i_not_taken(i_nt[k]),
      .w_primary(w_primary[k]), .w_complement(w_complement[k])
    );
  end

  memristor_readout #(.N(N_HIST)) u_readout (
    .w_taken(w_t), .w_not_taken(w_nt),
    .v_taken, .v_not_taken, .v_diff, .pred_taken(pred_live)
  );

  always_latch begin
    if (PREDICT) begin
      pred_taken = pred_live;
      v_diff_q   = v_diff;
    end
  end

  // Kirchhoff check: the solved line voltage must equal the summed cell
  // currents times the load resistance.
  real i_sum_t, i_sum_nt;
  always_comb begin
    i_sum_t  = 0.0;
    i_sum_nt = 0.0;
    for (int k = 0; k < N_HIST; k++) begin
      i_sum_t  += i_t[k];
      i_sum_nt += i_nt[k];
    end
  end
  always @(posedge clk) begin
    #1;
    if (PREDICT) begin
      assert (i_sum_t * R_LOAD - v_taken < 1.0e-3 && v_taken - i_sum_t * R_LOAD < 1.0e-3)
        else $error("Taken line current and voltage disagree");
      assert (i_sum_nt * R_LOAD - v_not_taken < 1.0e-3 && v_not_taken - i_sum_nt * R_LOAD < 1.0e-3)
        else $error("Not-taken line current and voltage disagree");
    end
  end
endmodule
