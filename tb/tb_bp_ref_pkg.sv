// tb_bp_ref_pkg: reference models used by the predictor testbenches.
//
// Plain, unoptimised models of the separated-weights predictor, of the
// adaptive four-state weight and of the adaptive-threshold rule, written
// from the algorithm description and independent of the RTL. Weights are
// kept as plain integers and the AFPBP weight as (state, wt, wnt, w) fields
// rather than a packed payload.
package tb_bp_ref_pkg;

  function automatic int clamp(int v, int lo, int hi);
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // ---------------- adaptive threshold ----------------
  class thr_ref;
    int theta, tc, tcmax, tcmin, thmax;
    function new(int init, int tc_bits, int th_bits);
      theta = init; tc = 0;
      tcmax = (1 << (tc_bits - 1)) - 1; tcmin = -(1 << (tc_bits - 1));
      thmax = (1 << th_bits) - 1;
    endfunction
    function void step(bit misp, bit lowc);
      if (misp) begin
        tc++;
        if (tc > tcmax) begin tc = 0; if (theta < thmax) theta++; end
      end else if (lowc) begin
        tc--;
        if (tc < tcmin) begin tc = 0; if (theta > 0) theta--; end
      end
    endfunction
  endclass

  // ---------------- AFPBP weight ----------------
  typedef struct {
    int st;   // 0..3
    int wt;   // state 0
    int wnt;  // state 0
    int w;    // states 1..3
  } afw_t;

  function automatic int afw_contrib(afw_t a, bit h);
    case (a.st)
      0: return h ? a.wt : a.wnt;
      1: return h ? a.w : -a.w;
      2: return h ? a.w : 0;
      default: return h ? 0 : a.w;
    endcase
  endfunction

  // one training step with m-bit halves and threshold thw
  function automatic afw_t afw_train(afw_t a, bit h, bit t, int m, int thw);
    afw_t r;
    int smax, smin, lmax, lmin, nv, other, step;
    smax = (1 << (m - 1)) - 1; smin = -(1 << (m - 1));
    lmax = (1 << (2 * m - 1)) - 1; lmin = -(1 << (2 * m - 1));
    r = a;
    step = t ? 1 : -1;
    if (a.st == 0) begin
      nv    = (h ? a.wt : a.wnt) + step;
      other = h ? a.wnt : a.wt;
      if (nv >= smin && nv <= smax) begin
        if (h) r.wt = nv; else r.wnt = nv;
      end else if (other >= -thw - 1 && other <= thw) begin
        r.st = h ? 2 : 3; r.w = nv; r.wt = 0; r.wnt = 0;
      end else if ((nv > smax) == (other > thw)) begin
        // same polarity: saturate
      end else begin
        r.st = 1; r.w = h ? nv : -nv; r.wt = 0; r.wnt = 0;
      end
    end else if (a.st == 1) begin
      nv = clamp(a.w + ((h == t) ? 1 : -1), lmin, lmax);
      if (nv >= smin && nv <= smax) begin
        r.st = 0; r.wt = nv; r.wnt = clamp(-nv, smin, smax); r.w = 0;
      end else r.w = nv;
    end else if ((a.st == 2 && h) || (a.st == 3 && !h)) begin
      nv = clamp(a.w + step, lmin, lmax);
      if (nv >= smin && nv <= smax) begin
        r.wt  = (a.st == 2) ? nv : 0;
        r.wnt = (a.st == 3) ? nv : 0;
        r.st = 0; r.w = 0;
      end else r.w = nv;
    end
    return r;
  endfunction

  // payload encoding used by the RTL: state 0 -> {wt, wnt}, else w
  function automatic int afw_payload(afw_t a, int m);
    int mask;
    mask = (1 << m) - 1;
    if (a.st == 0) return ((a.wt & mask) << m) | (a.wnt & mask);
    return a.w & ((1 << (2 * m)) - 1);
  endfunction

  // ---------------- generic predictor model ----------------
  // kind 0: separated-weights predictor, kind 1: AFPBP
  class pred_ref;
    int kind, ghl, h0, wbits, idxb, rows, m, thw;
    int wt[][], wnt[][], w[][], bias[];
    afw_t aw[][];
    bit ghr[];
    int path[];
    thr_ref thr;
    // last prediction
    int sum;
    bit pred;

    function new(int kind_i, int ghl_i, int h0_i, int wbits_i, int idxb_i, int m_i, int thw_i,
                 int th_init, int th_bits);
      kind = kind_i; ghl = ghl_i; h0 = h0_i; wbits = wbits_i; idxb = idxb_i;
      m = m_i; thw = thw_i; rows = 1 << idxb;
      wt = new[ghl]; wnt = new[ghl]; w = new[ghl]; aw = new[ghl];
      foreach (wt[i]) begin
        wt[i] = new[rows]; wnt[i] = new[rows]; w[i] = new[rows]; aw[i] = new[rows];
        for (int r = 0; r < rows; r++) begin
          wt[i][r] = 0; wnt[i][r] = 0; w[i][r] = 0;
          aw[i][r].st = 0; aw[i][r].wt = 0; aw[i][r].wnt = 0; aw[i][r].w = 0;
        end
      end
      bias = new[rows]; foreach (bias[r]) bias[r] = 0;
      ghr = new[ghl]; path = new[ghl];
      foreach (ghr[i]) begin ghr[i] = 0; path[i] = 0; end
      thr = new(th_init, 7, th_bits);
    endfunction

    function int row(int pc, int i);
      return (pc ^ path[i]) & (rows - 1);
    endfunction

    function int bw();  // bias width
      return (kind == 0) ? wbits : 2 * m;
    endfunction

    function bit predict(int pc);
      sum = bias[pc & (rows - 1)];
      for (int i = 0; i < ghl; i++) begin
        int r;
        r = row(pc, i);
        if (kind == 1) sum += afw_contrib(aw[i][r], ghr[i]);
        else if (i < h0) sum += ghr[i] ? wt[i][r] : wnt[i][r];
        else sum += ghr[i] ? w[i][r] : -w[i][r];
      end
      pred = (sum >= 0);
      return pred;
    endfunction

    // returns 1 when training happened; predict() must be called first
    function bit update(int pc, bit t);
      bit misp, lowc;
      int mag, lim, lo;
      mag  = (sum < 0) ? -sum : sum;
      misp = (pred != t);
      lowc = !misp && (mag <= thr.theta);
      if (misp || lowc) begin
        lim = (1 << (bw() - 1)) - 1; lo = -(1 << (bw() - 1));
        bias[pc & (rows - 1)] = clamp(bias[pc & (rows - 1)] + (t ? 1 : -1), lo, lim);
        lim = (1 << (wbits - 1)) - 1; lo = -(1 << (wbits - 1));
        for (int i = 0; i < ghl; i++) begin
          int r;
          r = row(pc, i);
          if (kind == 1) aw[i][r] = afw_train(aw[i][r], ghr[i], t, m, thw);
          else if (i < h0) begin
            if (ghr[i]) wt[i][r] = clamp(wt[i][r] + (t ? 1 : -1), lo, lim);
            else        wnt[i][r] = clamp(wnt[i][r] + (t ? 1 : -1), lo, lim);
          end else w[i][r] = clamp(w[i][r] + ((ghr[i] == t) ? 1 : -1), lo, lim);
        end
      end
      thr.step(misp, lowc);
      for (int i = ghl - 1; i > 0; i--) begin ghr[i] = ghr[i-1]; path[i] = path[i-1]; end
      ghr[0] = t; path[0] = pc & (rows - 1);
      return misp || lowc;
    endfunction
  endclass

  // ---------------- synthetic branch stream ----------------
  // Repeats a small program: x is a random value in [0,1500);
  //   branch A (pc 'h40):  taken when x >= 1000
  //   branch N (pc 'h84):  random, 50% taken (noise)
  //   branch B (pc 'h10c): taken when x >= 500  (A taken implies B taken)
  //   branch L (pc 'h200): loop back-edge, not taken every 4th visit
  class trace_gen;
    int x, slot, loopc;
    bit a_taken;
    function new(); slot = 0; loopc = 0; x = 0; a_taken = 0; endfunction
    function void next(output int pc, output bit t);
      case (slot)
        0: begin x = $urandom_range(0, 1499); pc = 'h40; t = (x >= 1000); a_taken = t; end
        1: begin pc = 'h84; t = $urandom_range(0, 1) == 1; end
        2: begin pc = 'h10c; t = (x >= 500); end
        default: begin pc = 'h200; loopc++; t = (loopc % 4) != 0; end
      endcase
      slot = (slot + 1) % 4;
    endfunction
  endclass

endpackage
