// tb_bp_index_hash: checks the PC XOR path row index against a bitwise
// reference for random addresses, plus the corner cases 0 and all ones.
module tb_bp_index_hash;
  localparam int IDX_BITS = 8;
  logic [IDX_BITS-1:0] pc, path_addr, idx;
  int checks = 0, failures = 0;

  bp_index_hash #(.IDX_BITS(IDX_BITS)) dut (.pc, .path_addr, .idx);

  task automatic check(logic [IDX_BITS-1:0] a, logic [IDX_BITS-1:0] b);
    logic [IDX_BITS-1:0] exp;
    pc = a; path_addr = b;
    #1;
    for (int k = 0; k < IDX_BITS; k++) exp[k] = (a[k] != b[k]);
    checks++;
    if (idx !== exp) begin
      failures++;
      $display("FAIL pc=%h path=%h idx=%h exp=%h", a, b, idx, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '0);
    check('1, '1);
    check(8'hA5, 8'h0F);
    for (int n = 0; n < 500; n++) check(IDX_BITS'($urandom), IDX_BITS'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
