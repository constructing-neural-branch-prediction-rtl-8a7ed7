// tb_bp_history: drives random branches into the global/path history and
// compares both registers every cycle with a shift-register reference;
// also checks that cycles without a branch leave the history unchanged and
// that reset clears it.
module tb_bp_history;
  localparam int GHL = 12, IDX_BITS = 5;
  logic clk = 0, rst_n = 0, upd = 0, taken = 0;
  logic [IDX_BITS-1:0] pc = '0;
  logic [GHL-1:0] ghr;
  logic [GHL-1:0][IDX_BITS-1:0] path;
  bit   ref_h [GHL];
  int   ref_p [GHL];
  int checks = 0, failures = 0, cycles = 0;

  bp_history #(.GHL(GHL), .IDX_BITS(IDX_BITS)) dut (.clk, .rst_n, .upd, .taken, .pc, .ghr, .path);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < GHL; i++) begin
      checks++;
      if (ghr[i] !== ref_h[i] || int'(path[i]) != ref_p[i]) begin
        failures++;
        $display("FAIL cycle %0d pos %0d ghr=%b/%b path=%0d/%0d", cycles, i, ghr[i], ref_h[i], path[i], ref_p[i]);
      end
    end
  endtask

  initial begin
    foreach (ref_h[i]) begin ref_h[i] = 0; ref_p[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare();
    for (cycles = 0; cycles < 400; cycles++) begin
      upd   = ($urandom_range(0, 3) != 0);
      taken = $urandom_range(0, 1) == 1;
      pc    = IDX_BITS'($urandom);
      @(posedge clk);
      if (upd) begin
        for (int i = GHL - 1; i > 0; i--) begin ref_h[i] = ref_h[i-1]; ref_p[i] = ref_p[i-1]; end
        ref_h[0] = taken; ref_p[0] = int'(pc);
      end
      #1 compare();
    end
    rst_n = 0;
    @(posedge clk);
    #1;
    foreach (ref_h[i]) begin ref_h[i] = 0; ref_p[i] = 0; end
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
