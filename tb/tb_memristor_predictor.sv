// tb_memristor_predictor: the two experiments run on the 1-bit circuit.
// Experiment 1: the outcome stays taken; the history bit is taken for 7
// cycles and then not taken. The prediction must start neutral, grow in
// confidence while history and outcome agree, turn into a misprediction
// right after the history changes, and become taken again within the
// following cycles. Experiment 2 runs on a second, fresh instance so that
// it also starts from a neutral weight: history stays taken; the
// outcome is taken for 7 cycles, then not taken. The prediction must stay
// taken (now wrong) just after the change and flip to not-taken later.
// Every prediction is also compared with a reference that tracks the two
// device states from the programming rule and evaluates the line voltages
// by its own bisection.
module tb_memristor_predictor;
  logic clk = 0, valid = 0, outcome = 0;
  logic [0:0] history = '0;
  logic pred_taken;
  real v_diff_q, v_taken, v_not_taken;
  real w_primary [1], w_complement [1];
  int checks = 0, failures = 0, cyc = 0;
  real rp, rc;            // reference device states
  int misp_seen = 0, recover_seen = 0;

  logic valid2 = 0, outcome2 = 0;
  logic [0:0] history2 = '0;
  logic pred_taken2;
  real v_diff_q2, v_taken2, v_not_taken2;
  real w_primary2 [1], w_complement2 [1];

  memristor_predictor #(.N_HIST(1)) dut (.clk, .valid, .history, .outcome, .pred_taken, .v_diff_q,
    .v_taken, .v_not_taken, .w_primary, .w_complement);

  memristor_predictor #(.N_HIST(1)) dut2 (.clk, .valid(valid2), .history(history2), .outcome(outcome2),
    .pred_taken(pred_taken2), .v_diff_q(v_diff_q2), .v_taken(v_taken2), .v_not_taken(v_not_taken2),
    .w_primary(w_primary2), .w_complement(w_complement2));

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_i(real wv, real vv);
    real sh;
    sh = ($exp(2.0 * vv) - $exp(-2.0 * vv)) / 2.0;
    return 1.0e-6 * (wv * wv * wv * wv * 9.0 * sh + 0.01 * ($exp(4.0 * vv) - 1.0));
  endfunction

  function automatic real ref_line(real wv);
    real lo, hi, mid;
    lo = 0.0; hi = 1.0;
    repeat (50) begin
      mid = (lo + hi) / 2.0;
      if (ref_i(wv, 1.0 - mid) * 200.0e3 > mid) lo = mid; else hi = mid;
    end
    return mid;
  endfunction

  // apply one branch to instance 1 (sel=0) or 2 (sel=1); returns the
  // prediction of that cycle
  task automatic branch(logic h, logic o, output logic p, output real d, input bit sel = 0);
    real vt, vnt;
    @(posedge clk);
    if (!sel) begin valid = 1; history[0] = h; outcome = o; end
    else begin valid2 = 1; history2[0] = h; outcome2 = o; end
    @(negedge clk);
    #1;
    p = sel ? pred_taken2 : pred_taken;
    d = sel ? v_diff_q2 : v_diff_q;
    vt  = ref_line(h ? rp : rc);
    vnt = ref_line(h ? rc : rp);
    checks++;
    if ((d - (vt - vnt)) > 1e-6 || ((vt - vnt) - d) > 1e-6 || p != ((vt - vnt) >= 0.0)) begin
      failures++;
      $display("FAIL cycle %0d v_diff %g exp %g", cyc, d, vt - vnt);
    end
    // reference programming step
    if (h == o) begin rp = (rp + 0.075 > 0.95) ? 0.95 : rp + 0.075; rc = (rc - 0.1 < 0.05) ? 0.05 : rc - 0.1; end
    else        begin rp = (rp - 0.1 < 0.05) ? 0.05 : rp - 0.1;    rc = (rc + 0.075 > 0.95) ? 0.95 : rc + 0.075; end
    cyc++;
  endtask

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    logic p;
    real d, last;
    // ---------------- experiment 1: history changes ----------------
    rp = 0.5; rc = 0.5;
    branch(1, 1, p, d);
    expect_true(d < 1e-9 && d > -1e-9, "first prediction neutral");
    last = d;
    for (int k = 1; k < 7; k++) begin
      branch(1, 1, p, d);
      expect_true(p && d >= last, "confidence grows on agreement");
      last = d;
    end
    branch(0, 1, p, d);
    expect_true(!p, "misprediction after history change");
    if (!p) misp_seen++;
    for (int k = 0; k < 9; k++) begin
      branch(0, 1, p, d);
      if (p) recover_seen++;
    end
    expect_true(p, "taken again after retraining");
    // ---------------- experiment 2: outcome changes ----------------
    @(posedge clk);
    valid = 0;
    rp = 0.5; rc = 0.5;
    branch(1, 1, p, d, 1);
    expect_true(d < 1e-9 && d > -1e-9, "second instance starts neutral");
    last = d;
    for (int k = 1; k < 7; k++) begin
      branch(1, 1, p, d, 1);
      expect_true(p && d >= last, "confidence grows while outcome is taken");
      last = d;
    end
    branch(1, 0, p, d, 1);
    expect_true(p, "still predicts taken right after the outcome changes");
    for (int k = 0; k < 12; k++) branch(1, 0, p, d, 1);
    expect_true(!p, "not-taken after retraining");
    expect_true(misp_seen > 0 && recover_seen > 0, "misprediction and recovery both seen");
    @(posedge clk);
    valid2 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
