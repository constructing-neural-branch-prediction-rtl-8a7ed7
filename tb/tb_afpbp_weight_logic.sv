// tb_afpbp_weight_logic: exhaustive check of the four-state weight. Every
// state code, every payload, both history values and both outcomes are
// applied; the contribution, next state and next payload are compared with
// the reference model. Each kind of state switch (0->1, 0->2, 0->3, 1->0,
// 2->0, 3->0 and saturation within state 0) is counted and must occur.
module tb_afpbp_weight_logic;
  import tb_bp_ref_pkg::*;
  localparam int M = 4, THW = 3;
  logic [1:0] st_in, st_next;
  logic [2*M-1:0] pl_in, pl_next;
  logic hist, taken;
  logic signed [2*M:0] contrib;
  int checks = 0, failures = 0;
  int sw [4][4];
  int sat0 = 0;

  afpbp_weight_logic #(.M(M), .THW(THW)) dut (.st_in, .pl_in, .hist, .taken, .contrib, .st_next, .pl_next);

  function automatic int sx(int v, int bits);
    return (v >= (1 << (bits - 1))) ? v - (1 << bits) : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    afw_t a, r;
    foreach (sw[i, j]) sw[i][j] = 0;
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < (1 << (2 * M)); p++)
        for (int hb = 0; hb < 2; hb++)
          for (int tb = 0; tb < 2; tb++) begin
            st_in = 2'(s); pl_in = (2*M)'(p); hist = hb[0]; taken = tb[0];
            #1;
            a.st = s;
            a.wt = sx((p >> M) & ((1 << M) - 1), M);
            a.wnt = sx(p & ((1 << M) - 1), M);
            a.w = sx(p, 2 * M);
            r = afw_train(a, hb[0], tb[0], M, THW);
            checks++;
            if (int'(contrib) != afw_contrib(a, hb[0])) begin
              failures++;
              $display("FAIL contrib st=%0d pl=%h h=%0d got %0d exp %0d", s, p, hb, contrib, afw_contrib(a, hb[0]));
            end
            checks++;
            if (int'(st_next) != r.st || int'(pl_next) != afw_payload(r, M)) begin
              failures++;
              $display("FAIL next st=%0d pl=%h h=%0d t=%0d got st=%0d pl=%h exp st=%0d pl=%h",
                       s, p, hb, tb, st_next, pl_next, r.st, afw_payload(r, M));
            end
            if (r.st != s) sw[s][r.st]++;
            if (s == 0 && r.st == 0 && int'(pl_next) == p) sat0++;
          end
    for (int k = 1; k < 4; k++) begin
      checks += 2;
      if (sw[0][k] == 0) begin failures++; $display("FAIL no switch 0->%0d", k); end
      if (sw[k][0] == 0) begin failures++; $display("FAIL no switch %0d->0", k); end
    end
    checks++;
    if (sat0 == 0) begin failures++; $display("FAIL no saturation in state 0"); end
    $display("switches 0->1 %0d 0->2 %0d 0->3 %0d 1->0 %0d 2->0 %0d 3->0 %0d, saturations %0d",
             sw[0][1], sw[0][2], sw[0][3], sw[1][0], sw[2][0], sw[3][0], sat0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
