// tb_afpbp_predictor: runs the adaptive four-state predictor on a synthetic
// branch stream and compares, every branch, the prediction, the sum, the
// threshold and the state code of every selected weight with the reference
// model. It also checks that the predictor
// learns the correlation it was designed for: branch B is always taken when
// the earlier branch A was taken (and unpredictable otherwise), so late in
// the run B must be predicted correctly after a taken A, and the loop branch
// must be learned. Training by misprediction, training by low confidence
// and threshold moves must all occur, and selected weights must be seen in
// each of the four states. Reduced sizes keep the run short.
module tb_afpbp_predictor;
  import tb_bp_ref_pkg::*;
  localparam int GHL = 24, H0 = 0, WBITS = 8, M = 4, THW = 3, IDX_BITS = 6, SUMW = 16, THB = 9;
  localparam int THI = (193 * GHL) / 100 + 14;
  localparam int NBR = 20000;
  logic clk = 0, rst_n = 0, br_valid = 0, br_taken = 0;
  logic [31:0] br_pc = '0;
  logic pred_taken, trained;
  logic signed [SUMW-1:0] pred_sum;
  logic [THB-1:0] theta;
  pred_ref  rm;
  trace_gen tg;
  int checks = 0, failures = 0;
  int n_misp = 0, n_low = 0, n_th = 0, b_ok = 0, b_cnt = 0, l_ok = 0, l_cnt = 0;
  int last_th;
  bit a_was_taken;

  logic [GHL-1:0][1:0] sel_state;
  int seen [4];

  afpbp_predictor #(.HIST(GHL), .M(M), .THW(THW), .IDX_BITS(IDX_BITS), .SUMW(SUMW), .THETA_BITS(THB)) dut (
    .clk, .rst_n, .br_valid, .br_pc, .br_taken, .pred_taken, .pred_sum, .theta, .trained, .sel_state);

  always #5 clk = ~clk;

  initial begin
    repeat (NBR + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("selected weights in state 0/1/2/3: %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL state %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pc;
    bit t, p;
    rm = new(1, GHL, H0, WBITS, IDX_BITS, M, THW, THI, THB);
    foreach (seen[k]) seen[k] = 0;
    tg = new();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    last_th = THI;
    for (int n = 0; n < NBR; n++) begin
      tg.next(pc, t);
      br_valid = 1; br_pc = pc; br_taken = t;
      #1;
      p = rm.predict(pc);
      checks++;
      if (pred_taken !== p || int'(pred_sum) != rm.sum || int'(theta) != rm.thr.theta) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d pc=%h pred %b/%b sum %0d/%0d theta %0d/%0d", n, pc, pred_taken, p,
                   pred_sum, rm.sum, theta, rm.thr.theta);
      end
      for (int i = 0; i < GHL; i++) begin
        checks++;
        if (int'(sel_state[i]) != rm.aw[i][rm.row(pc, i)].st) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d pos %0d state %0d/%0d", n, i, sel_state[i], rm.aw[i][rm.row(pc, i)].st);
        end
        seen[sel_state[i]]++;
      end
      if (pc == 'h40) a_was_taken = t;
      if (n > NBR / 2) begin
        if (pc == 'h10c && a_was_taken) begin b_cnt++; if (pred_taken == t) b_ok++; end
        if (pc == 'h200) begin l_cnt++; if (pred_taken == t) l_ok++; end
      end
      if (trained) begin if (pred_taken != t) n_misp++; else n_low++; end
      @(posedge clk);
      void'(rm.update(pc, t));
      #1;
      if (int'(theta) != last_th) n_th++;
      last_th = int'(theta);
    end
    br_valid = 0;
    $display("B after taken A: %0d/%0d correct; loop branch: %0d/%0d correct", b_ok, b_cnt, l_ok, l_cnt);
    $display("trained on misprediction %0d, on low confidence %0d, theta changes %0d", n_misp, n_low, n_th);
    checks++;
    if (b_ok * 100 < b_cnt * 95) begin failures++; $display("FAIL correlated branch not learned"); end
    checks++;
    if (l_ok * 100 < l_cnt * 90) begin failures++; $display("FAIL loop branch not learned"); end
    checks++;
    if (n_misp == 0 || n_low == 0 || n_th == 0) begin failures++; $display("FAIL a mechanism never happened"); end
    $display("selected weights in state 0/1/2/3: %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL state %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
