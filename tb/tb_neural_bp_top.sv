// tb_neural_bp_top: end-to-end test of the three predictors at their
// default sizes (64-bit history with 20 separated positions, 40-position
// adaptive predictor, 1-bit memristor circuit).
// The same synthetic branch stream drives both digital predictors; every
// branch, their predictions, sums and thresholds are compared with the
// reference models. The memristor circuit meanwhile runs the
// history-change experiment. Each mechanism must happen at least once:
// training on a misprediction and on low confidence, a threshold change
// (both predictors), a separated-weight selection of both WT and WNT,
// adaptive weights in each of the four states, and in the memristor model
// a misprediction followed by recovery.
module tb_neural_bp_top;
  import tb_bp_ref_pkg::*;
  localparam int NBR = 12000;
  logic clk = 0, rst_n = 0, mem_clk = 0;
  logic swp_valid = 0, swp_taken = 0, afp_valid = 0, afp_taken = 0;
  logic [31:0] swp_pc = '0, afp_pc = '0;
  logic swp_pred, swp_trained, afp_pred, afp_trained, mem_pred;
  logic signed [15:0] swp_sum, afp_sum;
  logic [8:0] swp_theta, afp_theta;
  logic [39:0][1:0] afp_state;
  logic mem_valid = 0, mem_outcome = 0;
  logic [0:0] mem_history = '0;
  real mem_v_diff, mem_v_taken, mem_v_not_taken;
  real mem_w_primary [1], mem_w_complement [1];

  pred_ref  swp_rm, afp_rm;
  trace_gen tg;
  int checks = 0, failures = 0;
  int ev_misp [2], ev_low [2], ev_th [2], ev_state [4], ev_wt = 0, ev_wnt = 0, ev_mem_misp = 0, ev_mem_rec = 0;
  int last_th [2];

  neural_bp_top dut (
    .clk, .rst_n,
    .swp_valid, .swp_pc, .swp_taken, .swp_pred, .swp_sum, .swp_theta, .swp_trained,
    .afp_valid, .afp_pc, .afp_taken, .afp_pred, .afp_sum, .afp_theta, .afp_trained, .afp_state,
    .mem_clk, .mem_valid, .mem_history, .mem_outcome, .mem_pred, .mem_v_diff,
    .mem_v_taken, .mem_v_not_taken, .mem_w_primary, .mem_w_complement
  );

  always #5 clk = ~clk;
  always #5 mem_clk = ~mem_clk;

  initial begin
    repeat (NBR + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(int count, string what);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-40s %0d", what, count);
  endtask

  // memristor: history-change experiment, one branch per mem_clk cycle
  initial begin
    @(posedge mem_clk);
    for (int k = 0; k < 24; k++) begin
      mem_valid = 1; mem_outcome = 1; mem_history[0] = (k < 7);
      @(negedge mem_clk);
      #1;
      if (k >= 7 && !mem_pred) ev_mem_misp++;
      if (k >= 7 && mem_pred && ev_mem_misp > 0) ev_mem_rec++;
      @(posedge mem_clk);
    end
    mem_valid = 0;
  end

  initial begin
    int pc;
    bit t, p;
    foreach (ev_misp[i]) begin ev_misp[i] = 0; ev_low[i] = 0; ev_th[i] = 0; end
    foreach (ev_state[i]) ev_state[i] = 0;
    swp_rm = new(0, 64, 20, 7, 8, 0, 0, (193 * 64) / 100 + 14, 9);
    afp_rm = new(1, 40, 0, 8, 8, 4, 3, (193 * 40) / 100 + 14, 9);
    tg = new();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    last_th[0] = int'(swp_theta);
    last_th[1] = int'(afp_theta);
    for (int n = 0; n < NBR; n++) begin
      tg.next(pc, t);
      swp_valid = 1; swp_pc = pc; swp_taken = t;
      afp_valid = 1; afp_pc = pc; afp_taken = t;
      #1;
      p = swp_rm.predict(pc);
      checks++;
      if (swp_pred !== p || int'(swp_sum) != swp_rm.sum || int'(swp_theta) != swp_rm.thr.theta) begin
        failures++;
        if (failures < 10) $display("FAIL swp n=%0d sum %0d/%0d", n, swp_sum, swp_rm.sum);
      end
      p = afp_rm.predict(pc);
      checks++;
      if (afp_pred !== p || int'(afp_sum) != afp_rm.sum || int'(afp_theta) != afp_rm.thr.theta) begin
        failures++;
        if (failures < 10) $display("FAIL afpbp n=%0d sum %0d/%0d", n, afp_sum, afp_rm.sum);
      end
      for (int i = 0; i < 20; i++) if (swp_rm.ghr[i]) ev_wt++; else ev_wnt++;
      for (int i = 0; i < 40; i++) ev_state[afp_state[i]]++;
      if (swp_trained) begin if (swp_pred != t) ev_misp[0]++; else ev_low[0]++; end
      if (afp_trained) begin if (afp_pred != t) ev_misp[1]++; else ev_low[1]++; end
      @(posedge clk);
      void'(swp_rm.update(pc, t));
      void'(afp_rm.update(pc, t));
      #1;
      if (int'(swp_theta) != last_th[0]) ev_th[0]++;
      if (int'(afp_theta) != last_th[1]) ev_th[1]++;
      last_th[0] = int'(swp_theta);
      last_th[1] = int'(afp_theta);
    end
    swp_valid = 0; afp_valid = 0;
    $display("mechanism counts:");
    need(ev_misp[0], "SWP training on misprediction");
    need(ev_low[0],  "SWP training on low confidence");
    need(ev_th[0],   "SWP threshold change");
    need(ev_wt,      "SWP taken weight (WT) selected");
    need(ev_wnt,     "SWP not-taken weight (WNT) selected");
    need(ev_misp[1], "AFPBP training on misprediction");
    need(ev_low[1],  "AFPBP training on low confidence");
    need(ev_th[1],   "AFPBP threshold change");
    need(ev_state[0], "AFPBP weight in state 0 (separated)");
    need(ev_state[1], "AFPBP weight in state 1 (perceptron)");
    need(ev_state[2], "AFPBP weight in state 2 (taken only)");
    need(ev_state[3], "AFPBP weight in state 3 (not-taken only)");
    need(ev_mem_misp, "memristor misprediction after history change");
    need(ev_mem_rec,  "memristor recovery to taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
