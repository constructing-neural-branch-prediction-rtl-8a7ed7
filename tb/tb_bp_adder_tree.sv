// tb_bp_adder_tree: random signed terms, including all-minimum and
// all-maximum vectors, summed by the block and by a reference loop.
module tb_bp_adder_tree;
  localparam int N = 65, IN_W = 8, SUMW = 16;
  logic [N-1:0][IN_W-1:0] terms;
  logic signed [SUMW-1:0] sum;
  int checks = 0, failures = 0;

  bp_adder_tree #(.N(N), .IN_W(IN_W), .SUMW(SUMW)) dut (.terms, .sum);

  task automatic check_sum();
    int exp;
    #1;
    exp = 0;
    for (int i = 0; i < N; i++) begin
      int v;
      v = int'(terms[i]);
      if (v >= (1 << (IN_W - 1))) v -= (1 << IN_W);
      exp += v;
    end
    checks++;
    if (int'(sum) != exp) begin
      failures++;
      $display("FAIL sum=%0d exp=%0d", sum, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) terms[i] = 8'h80;
    check_sum();
    for (int i = 0; i < N; i++) terms[i] = 8'h7f;
    check_sum();
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < N; i++) terms[i] = IN_W'($urandom);
      check_sum();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
