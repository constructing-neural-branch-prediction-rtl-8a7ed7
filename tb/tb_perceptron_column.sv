// tb_perceptron_column: random reads and training steps on a small single
// weight column. A reference array gives h*W every cycle (+W for taken
// history, -W for not-taken) and trains W by +1 when history and outcome
// agree and -1 when they differ; phases with one dominant outcome drive the
// weights to both saturation limits.
module tb_perceptron_column;
  import tb_bp_ref_pkg::*;
  localparam int WBITS = 5, IDX_BITS = 3, ROWS = 1 << IDX_BITS;
  localparam int WMAX = (1 << (WBITS - 1)) - 1, WMIN = -(1 << (WBITS - 1));
  logic clk = 0, rst_n = 0, hist = 0, train = 0, taken = 0;
  logic [IDX_BITS-1:0] idx = '0;
  logic signed [WBITS:0] weight;
  int rt [ROWS];
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  perceptron_column #(.WBITS(WBITS), .IDX_BITS(IDX_BITS)) dut (.clk, .rst_n, .idx, .hist, .contrib(weight), .train, .taken);

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
    foreach (rt[r]) rt[r] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      // phases with a strong outcome bias push weights to the limits
      bias_t = (n / 500) % 3;
      idx   = IDX_BITS'($urandom);
      taken = $urandom_range(0, 1) == 1;
      train = $urandom_range(0, 3) != 0;
      hist  = (bias_t == 0) ? taken : (bias_t == 1) ? !taken : ($urandom_range(0, 1) == 1);
      #1;
      checks++;
      if (int'(weight) != (hist ? rt[idx] : -rt[idx])) begin
        failures++;
        $display("FAIL n=%0d idx=%0d hist=%b got %0d exp %0d", n, idx, hist, weight, hist ? rt[idx] : -rt[idx]);
      end
      @(posedge clk);
      if (train) begin
        rt[idx] = clamp(rt[idx] + ((hist == taken) ? 1 : -1), WMIN, WMAX);
        if (rt[idx] == WMAX) sat_hi++;
        if (rt[idx] == WMIN) sat_lo++;
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
