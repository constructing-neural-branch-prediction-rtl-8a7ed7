// tb_afpbp_column: random reads and training on a small AFPBP weight table.
// The reference keeps one (state, wt, wnt, w) record per row and applies
// the reference training rule; contribution and state code are compared
// every cycle. Phases of strongly correlated history/outcome push weights
// out of the separated state and back, and every state must be visited.
// The table is reset at the start of the taken-only and not-taken-only
// phases so that those phases start from separated weights.
module tb_afpbp_column;
  import tb_bp_ref_pkg::*;
  localparam int M = 4, THW = 3, IDX_BITS = 2, ROWS = 1 << IDX_BITS;
  logic clk = 0, rst_n = 0, hist = 0, train = 0, taken = 0;
  logic [IDX_BITS-1:0] idx = '0;
  logic signed [2*M:0] contrib;
  logic [1:0] state;
  afw_t rw [ROWS];
  int checks = 0, failures = 0;
  int seen [4];

  afpbp_column #(.M(M), .THW(THW), .IDX_BITS(IDX_BITS)) dut (.clk, .rst_n, .idx, .hist, .contrib, .state, .train, .taken);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rw[r]) begin rw[r].st = 0; rw[r].wt = 0; rw[r].wnt = 0; rw[r].w = 0; end
    foreach (seen[k]) seen[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int ph;
      ph    = (n / 400) % 5;
      // clear the table when the taken-only and not-taken-only phases start
      if (n % 400 == 0 && (ph == 1 || ph == 3)) begin
        rst_n = 0;
        @(posedge clk);
        #1 rst_n = 1;
        foreach (rw[r]) begin rw[r].st = 0; rw[r].wt = 0; rw[r].wnt = 0; rw[r].w = 0; end
      end
      idx   = IDX_BITS'($urandom);
      train = $urandom_range(0, 4) != 0;
      case (ph)
        0: begin hist = $urandom_range(0, 1) == 1; taken = hist; end          // positive correlation
        1: begin hist = 1; taken = 1; end                                     // taken history -> taken
        2: begin hist = $urandom_range(0, 1) == 1; taken = !hist; end         // negative correlation
        3: begin hist = 0; taken = 0; end                                     // not-taken history -> not-taken
        default: begin hist = $urandom_range(0, 1) == 1; taken = $urandom_range(0, 1) == 1; end
      endcase
      #1;
      checks++;
      if (int'(contrib) != afw_contrib(rw[idx], hist) || int'(state) != rw[idx].st) begin
        failures++;
        $display("FAIL n=%0d row %0d contrib %0d/%0d state %0d/%0d", n, idx, contrib,
                 afw_contrib(rw[idx], hist), state, rw[idx].st);
      end
      seen[rw[idx].st]++;
      @(posedge clk);
      if (train) rw[idx] = afw_train(rw[idx], hist, taken, M, THW);
      #1;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL state %0d never held", k); end
    end
    $display("cycles in state 0/1/2/3: %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
