// tb_swp_sep_column: random reads and training steps on a small separated
// weight column. A reference pair of arrays predicts the selected weight
// every cycle; long runs of one outcome drive weights into both saturation
// limits, and the untouched weight of a pair is checked to stay put.
module tb_swp_sep_column;
  import tb_bp_ref_pkg::*;
  localparam int WBITS = 5, IDX_BITS = 3, ROWS = 1 << IDX_BITS;
  localparam int WMAX = (1 << (WBITS - 1)) - 1, WMIN = -(1 << (WBITS - 1));
  logic clk = 0, rst_n = 0, hist = 0, train = 0, taken = 0;
  logic [IDX_BITS-1:0] idx = '0;
  logic signed [WBITS-1:0] weight;
  int rt [ROWS], rnt [ROWS];
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  swp_sep_column #(.WBITS(WBITS), .IDX_BITS(IDX_BITS)) dut (.clk, .rst_n, .idx, .hist, .weight, .train, .taken);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias_t;
    foreach (rt[r]) begin rt[r] = 0; rnt[r] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      // phases with a strong outcome bias push weights to the limits
      bias_t = (n / 500) % 3;
      idx   = IDX_BITS'($urandom);
      hist  = $urandom_range(0, 1) == 1;
      train = $urandom_range(0, 3) != 0;
      taken = (bias_t == 0) ? 1'b1 : (bias_t == 1) ? 1'b0 : ($urandom_range(0, 1) == 1);
      #1;
      checks++;
      if (int'(weight) != (hist ? rt[idx] : rnt[idx])) begin
        failures++;
        $display("FAIL n=%0d idx=%0d hist=%b got %0d exp %0d", n, idx, hist, weight, hist ? rt[idx] : rnt[idx]);
      end
      @(posedge clk);
      if (train) begin
        if (hist) rt[idx] = clamp(rt[idx] + (taken ? 1 : -1), WMIN, WMAX);
        else      rnt[idx] = clamp(rnt[idx] + (taken ? 1 : -1), WMIN, WMAX);
        if (rt[idx] == WMAX || rnt[idx] == WMAX) sat_hi++;
        if (rt[idx] == WMIN || rnt[idx] == WMIN) sat_lo++;
      end
      #1;
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not reached hi=%0d lo=%0d", sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
