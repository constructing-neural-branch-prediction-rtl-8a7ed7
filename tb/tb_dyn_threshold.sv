// tb_dyn_threshold: feeds random mixes of misprediction and low-confidence
// events and compares theta with the reference counter rule each cycle.
// Phases dominated by one event kind make theta rise and fall; both moves
// must be seen.
module tb_dyn_threshold;
  import tb_bp_ref_pkg::*;
  localparam int THB = 9, INIT = 20;
  logic clk = 0, rst_n = 0, mispredict = 0, low_conf = 0;
  logic [THB-1:0] theta;
  thr_ref rm;
  int checks = 0, failures = 0, ups = 0, downs = 0, last;

  dyn_threshold #(.THETA_BITS(THB), .THETA_INIT(INIT), .TC_BITS(7)) dut (.clk, .rst_n, .mispredict, .low_conf, .theta);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rm = new(INIT, 7, THB);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    last = INIT;
    for (int n = 0; n < 12000; n++) begin
      int ph;
      ph = (n / 3000) % 2;
      mispredict = (ph == 0) ? ($urandom_range(0, 9) < 6) : ($urandom_range(0, 9) < 2);
      low_conf   = !mispredict && $urandom_range(0, 1) == 1;
      @(posedge clk);
      rm.step(mispredict, low_conf);
      #1;
      checks++;
      if (int'(theta) != rm.theta) begin
        failures++;
        $display("FAIL n=%0d theta=%0d exp=%0d", n, theta, rm.theta);
      end
      if (int'(theta) > last) ups++;
      if (int'(theta) < last) downs++;
      last = int'(theta);
    end
    checks++;
    if (ups == 0 || downs == 0) begin
      failures++;
      $display("FAIL theta moves up=%0d down=%0d", ups, downs);
    end
    $display("theta raised %0d times, lowered %0d times", ups, downs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
