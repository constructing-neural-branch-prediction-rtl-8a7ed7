// tb_memristor_readout: random device states on the two summing lines
// (some entries disconnected). Each solved line voltage must satisfy
// Kirchhoff's law V/R = sum I(w, VDD-V) with the current law evaluated
// independently, the comparator output must follow the larger voltage, and
// a line with more or stronger devices must come out higher.
module tb_memristor_readout;
  localparam int N = 3;
  real w_t [N], w_nt [N];
  real v_taken, v_not_taken, v_diff;
  logic pred_taken;
  int checks = 0, failures = 0;

  memristor_readout #(.N(N)) dut (.w_taken(w_t), .w_not_taken(w_nt), .v_taken, .v_not_taken, .v_diff, .pred_taken);

  function automatic real ref_i(real wv, real vv);
    real sh;
    sh = ($exp(2.0 * vv) - $exp(-2.0 * vv)) / 2.0;
    return 1.0e-6 * (wv * wv * wv * wv * 9.0 * sh + 0.01 * ($exp(4.0 * vv) - 1.0));
  endfunction

  function automatic real kcl_err(real ws [N], real v);
    real s;
    s = 0.0;
    for (int k = 0; k < N; k++) if (ws[k] >= 0.0) s += ref_i(ws[k], 1.0 - v);
    return s * 200.0e3 - v;
  endfunction

  task automatic check_all();
    real e1, e2;
    #1;
    e1 = kcl_err(w_t, v_taken);
    e2 = kcl_err(w_nt, v_not_taken);
    checks++;
    if (e1 > 1e-6 || e1 < -1e-6 || e2 > 1e-6 || e2 < -1e-6) begin
      failures++;
      $display("FAIL KCL residual %g %g (v %g %g)", e1, e2, v_taken, v_not_taken);
    end
    checks++;
    if (pred_taken != (v_taken >= v_not_taken)) begin
      failures++;
      $display("FAIL comparator");
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
    // strong device on Taken, weak on Not-taken
    foreach (w_t[k]) begin w_t[k] = -1.0; w_nt[k] = -1.0; end
    w_t[0] = 0.95; w_nt[0] = 0.05;
    check_all();
    checks++;
    if (!(pred_taken && v_diff > 0.05)) begin failures++; $display("FAIL strong taken %g", v_diff); end
    w_t[0] = 0.05; w_nt[0] = 0.95;
    check_all();
    checks++;
    if (pred_taken) begin failures++; $display("FAIL strong not-taken %g", v_diff); end
    // equal weights are neutral
    w_t[0] = 0.5; w_nt[0] = 0.5;
    check_all();
    checks++;
    if (v_diff > 1e-9 || v_diff < -1e-9) begin failures++; $display("FAIL neutral %g", v_diff); end
    // nothing connected -> both lines at 0 V
    w_t[0] = -1.0; w_nt[0] = -1.0;
    check_all();
    checks++;
    if (v_taken > 1e-9 || v_not_taken > 1e-9) begin failures++; $display("FAIL idle lines"); end
    for (int n = 0; n < 300; n++) begin
      foreach (w_t[k]) begin
        w_t[k]  = ($urandom_range(0, 4) == 0) ? -1.0 : 0.05 + 0.9 * $urandom_range(0, 1000) / 1000.0;
        w_nt[k] = ($urandom_range(0, 4) == 0) ? -1.0 : 0.05 + 0.9 * $urandom_range(0, 1000) / 1000.0;
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
