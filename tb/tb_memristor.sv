// tb_memristor: checks the device model's current against the fitted I-V
// law evaluated independently (sinh written out with exponentials) over a
// sweep of voltages and states, and checks the stepwise programming:
// positive pulses turn the device on by the on-step up to lmax, negative
// pulses turn it off by the larger off-step down to lmin, and voltages
// below the programming level leave it unchanged.
module tb_memristor;
  real  v = 0.0, i, w;
  logic prog = 0;
  int checks = 0, failures = 0;

  memristor #(.W_INIT(0.5), .STEP_ON(0.075), .STEP_OFF(0.1), .V_PROG(0.5)) dut (.v, .prog, .i, .w);

  function automatic real ref_i(real wv, real vv);
    real sh;
    sh = ($exp(2.0 * vv) - $exp(-2.0 * vv)) / 2.0;
    return 1.0e-6 * (wv * wv * wv * wv * 9.0 * sh + 0.01 * ($exp(4.0 * vv) - 1.0));
  endfunction

  task automatic near(real got, real exp, real tol, string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got %g exp %g", what, got, exp);
    end
  endtask

  task automatic pulse(real vv);
    v = vv;
    #1 prog = 1;
    #1 prog = 0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real wexp;
    #1;
    near(w, 0.5, 1e-12, "initial state");
    for (int k = -10; k <= 10; k++) begin
      v = k * 0.1;
      #1 near(i, ref_i(0.5, v), 1e-12, "current at w=0.5");
    end
    wexp = 0.5;
    for (int k = 0; k < 10; k++) begin
      pulse(1.0);
      wexp = (wexp + 0.075 > 0.95) ? 0.95 : wexp + 0.075;
      near(w, wexp, 1e-9, "turn-on step");
    end
    pulse(0.3);
    near(w, wexp, 1e-9, "no change below programming level");
    v = 0.7;
    #1 near(i, ref_i(0.95, 0.7), 1e-12, "current at w=0.95");
    for (int k = 0; k < 12; k++) begin
      pulse(-1.0);
      wexp = (wexp - 0.1 < 0.05) ? 0.05 : wexp - 0.1;
      near(w, wexp, 1e-9, "turn-off step");
    end
    v = 0.7;
    #1 near(i, ref_i(0.05, 0.7), 1e-12, "current at w=0.05");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
