// tb_memristor_pbp_cell: checks the current steering and the update
// direction of one complementary weight cell. In prediction the primary
// device must feed the Taken line for taken history and the Not-taken line
// for not-taken history (complement the other way), with currents given by
// the device law at VDD minus the line voltage. In update, agreement of
// history and outcome must turn the primary on and the complement off, and
// disagreement the reverse; with neither phase active nothing is connected.
module tb_memristor_pbp_cell;
  logic PREDICT = 0, UPDATE = 0, HISTORY = 0, OUTCOME = 0;
  real v_taken = 0.0, v_not_taken = 0.0;
  real w_to_taken, w_to_not_taken, i_taken, i_not_taken, w_primary, w_complement;
  int checks = 0, failures = 0;
  real wp, wc;

  memristor_pbp_cell #(.W_INIT(0.5)) dut (.PREDICT, .UPDATE, .HISTORY, .OUTCOME, .v_taken, .v_not_taken,
    .w_to_taken, .w_to_not_taken, .i_taken, .i_not_taken, .w_primary, .w_complement);

  function automatic real ref_i(real wv, real vv);
    real sh;
    sh = ($exp(2.0 * vv) - $exp(-2.0 * vv)) / 2.0;
    return 1.0e-6 * (wv * wv * wv * wv * 9.0 * sh + 0.01 * ($exp(4.0 * vv) - 1.0));
  endfunction

  task automatic near(real got, real exp, string what);
    checks++;
    if (got - exp > 1e-9 || exp - got > 1e-9) begin
      failures++;
      $display("FAIL %s got %g exp %g", what, got, exp);
    end
  endtask

  task automatic do_update(logic h, logic o);
    HISTORY = h; OUTCOME = o; PREDICT = 0;
    #1 UPDATE = 1;
    #1 UPDATE = 0;
    #1;
  endtask

  task automatic check_predict(logic h);
    HISTORY = h; PREDICT = 1; v_taken = 0.2; v_not_taken = 0.1;
    #1;
    near(w_to_taken,     h ? w_primary : w_complement, "Taken-line device");
    near(w_to_not_taken, h ? w_complement : w_primary, "Not-taken-line device");
    near(i_taken,     ref_i(h ? w_primary : w_complement, 0.8), "Taken-line current");
    near(i_not_taken, ref_i(h ? w_complement : w_primary, 0.9), "Not-taken-line current");
    PREDICT = 0;
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
    #1;
    near(w_to_taken, -1.0, "idle Taken line");
    near(i_not_taken, 0.0, "idle current");
    // agree (1,1): primary on, complement off
    wp = w_primary; wc = w_complement;
    do_update(1, 1);
    checks++;
    if (!(w_primary > wp && w_complement < wc)) begin failures++; $display("FAIL agree (1,1) direction"); end
    // agree (0,0)
    wp = w_primary; wc = w_complement;
    do_update(0, 0);
    checks++;
    if (!(w_primary > wp && w_complement < wc)) begin failures++; $display("FAIL agree (0,0) direction"); end
    check_predict(1);
    check_predict(0);
    // disagree (1,0) and (0,1): primary off, complement on
    wp = w_primary; wc = w_complement;
    do_update(1, 0);
    checks++;
    if (!(w_primary < wp && w_complement > wc)) begin failures++; $display("FAIL disagree (1,0) direction"); end
    wp = w_primary; wc = w_complement;
    do_update(0, 1);
    checks++;
    if (!(w_primary < wp && w_complement > wc)) begin failures++; $display("FAIL disagree (0,1) direction"); end
    check_predict(1);
    check_predict(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
