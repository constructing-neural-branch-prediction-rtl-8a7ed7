// tb_workload_hist_sweep: the adaptive four-state predictor against the
// fully separated-weights predictor at history lengths 10, 20, 30 and 40,
// the comparison at equal history length, run on one synthetic branch
// stream (the original trace set is not reproduced here). Each of the eight
// instances is compared with its reference model on every branch, and the
// misprediction counts are printed side by side.
module tb_workload_hist_sweep;
  import tb_bp_ref_pkg::*;
  localparam int NH  = 4;
  localparam int NBR = 6000;
  localparam int HL [NH] = '{10, 20, 30, 40};

  logic clk = 0, rst_n = 0, br_valid = 0, br_taken = 0;
  logic [31:0] br_pc = '0;
  logic [NH-1:0] pred_s, pred_a;
  logic signed [15:0] sum_s [NH], sum_a [NH];
  pred_ref rs [NH], ra [NH];
  trace_gen tg;
  int checks = 0, failures = 0;
  int misp_s [NH], misp_a [NH];

  for (genvar k = 0; k < NH; k++) begin : g_len
    logic signed [15:0] ss, sa;
    logic [8:0] ths, tha;
    logic trs, tra;
    logic [HL[k]-1:0][1:0] st;
    swp_predictor #(.GHL(HL[k]), .H0(HL[k]), .WBITS(7)) u_swp (
      .clk, .rst_n, .br_valid, .br_pc, .br_taken, .pred_taken(pred_s[k]), .pred_sum(ss), .theta(ths), .trained(trs));
    afpbp_predictor #(.HIST(HL[k])) u_afp (
      .clk, .rst_n, .br_valid, .br_pc, .br_taken, .pred_taken(pred_a[k]), .pred_sum(sa), .theta(tha), .trained(tra),
      .sel_state(st));
    assign sum_s[k] = ss;
    assign sum_a[k] = sa;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (NBR + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pc;
    bit t, p;
    for (int k = 0; k < NH; k++) begin
      rs[k] = new(0, HL[k], HL[k], 7, 8, 0, 0, (193 * HL[k]) / 100 + 14, 9);
      ra[k] = new(1, HL[k], 0, 8, 8, 4, 3, (193 * HL[k]) / 100 + 14, 9);
      misp_s[k] = 0; misp_a[k] = 0;
    end
    tg = new();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < NBR; n++) begin
      tg.next(pc, t);
      br_valid = 1; br_pc = pc; br_taken = t;
      #1;
      for (int k = 0; k < NH; k++) begin
        p = rs[k].predict(pc);
        checks++;
        if (pred_s[k] !== p || int'(sum_s[k]) != rs[k].sum) begin
          failures++;
          if (failures < 10) $display("FAIL swp hist %0d n=%0d", HL[k], n);
        end
        p = ra[k].predict(pc);
        checks++;
        if (pred_a[k] !== p || int'(sum_a[k]) != ra[k].sum) begin
          failures++;
          if (failures < 10) $display("FAIL afpbp hist %0d n=%0d", HL[k], n);
        end
        if (pred_s[k] != t) misp_s[k]++;
        if (pred_a[k] != t) misp_a[k]++;
      end
      @(posedge clk);
      for (int k = 0; k < NH; k++) begin
        void'(rs[k].update(pc, t));
        void'(ra[k].update(pc, t));
      end
      #1;
    end
    br_valid = 0;
    for (int k = 0; k < NH; k++)
      $display("history %0d: SWP %0d, AFPBP %0d mispredictions in %0d branches", HL[k], misp_s[k], misp_a[k], NBR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
