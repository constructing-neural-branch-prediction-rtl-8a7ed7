// tb_workload_swp_sweep: the separated-weights predictor in the
// configurations of the two SWP evaluations, run side by side on one
// synthetic branch stream (the original trace set is not reproduced here):
//   * weight width 4, 5, 6 and 7 bits with 20 of 64 history positions
//     separated;
//   * 0, 40 and 64 separated positions of 64 with 7-bit weights
//     (the 20-position point is the 7-bit run above).
// Every instance is compared with its own reference model on every branch,
// and the misprediction count of each configuration is printed.
module tb_workload_swp_sweep;
  import tb_bp_ref_pkg::*;
  localparam int NCFG = 7;
  localparam int NBR  = 6000;
  localparam int GHL  = 64;
  localparam int WB [NCFG] = '{4, 5, 6, 7, 7, 7, 7};
  localparam int HS [NCFG] = '{20, 20, 20, 20, 0, 40, 64};
  localparam int THI = (193 * GHL) / 100 + 14;

  logic clk = 0, rst_n = 0, br_valid = 0, br_taken = 0;
  logic [31:0] br_pc = '0;
  logic [NCFG-1:0] pred;
  logic signed [15:0] sums [NCFG];
  pred_ref rm [NCFG];
  trace_gen tg;
  int checks = 0, failures = 0;
  int misp [NCFG];

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    logic signed [15:0] s;
    logic [8:0] th;
    logic tr;
    swp_predictor #(.GHL(GHL), .H0(HS[k]), .WBITS(WB[k])) u_swp (
      .clk, .rst_n, .br_valid, .br_pc, .br_taken, .pred_taken(pred[k]), .pred_sum(s), .theta(th), .trained(tr));
    assign sums[k] = s;
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
    for (int k = 0; k < NCFG; k++) begin
      rm[k] = new(0, GHL, HS[k], WB[k], 8, 0, 0, THI, 9);
      misp[k] = 0;
    end
    tg = new();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < NBR; n++) begin
      tg.next(pc, t);
      br_valid = 1; br_pc = pc; br_taken = t;
      #1;
      for (int k = 0; k < NCFG; k++) begin
        p = rm[k].predict(pc);
        checks++;
        if (pred[k] !== p || int'(sums[k]) != rm[k].sum) begin
          failures++;
          if (failures < 10) $display("FAIL cfg %0d n=%0d sum %0d/%0d", k, n, sums[k], rm[k].sum);
        end
        if (pred[k] != t) misp[k]++;
      end
      @(posedge clk);
      for (int k = 0; k < NCFG; k++) void'(rm[k].update(pc, t));
      #1;
    end
    br_valid = 0;
    for (int k = 0; k < NCFG; k++)
      $display("SWP weight bits %0d, separated %2d of %0d: %0d mispredictions in %0d branches",
               WB[k], HS[k], GHL, misp[k], NBR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
