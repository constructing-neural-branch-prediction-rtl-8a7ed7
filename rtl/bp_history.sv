// bp_history: global branch history (GHR) and path address history (HA).
//
// On every resolved branch (upd) the outcome is shifted into the GHR and the
// low IDX_BITS address bits of the branch into the path register, so that
// position 1 always holds the most recent branch. Position i of the outputs
// (0-based here, i.e. ghr[0] is history bit 1) feeds history column i+1.
// Both registers clear to zero (not-taken, address 0) on reset; that reset
// value is this design's choice. History is updated as soon as the branch is
// presented, matching an immediately-updated (perfect) history.
module bp_history #(
  parameter int GHL      = 64,
  parameter int IDX_BITS = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          upd,      // a branch was resolved this cycle
  input  logic                          taken,    // its outcome
  input  logic [IDX_BITS-1:0]           pc,       // its low address bits
  output logic [GHL-1:0]                ghr,      // ghr[0] = most recent outcome
  output logic [GHL-1:0][IDX_BITS-1:0]  path      // path[0] = most recent address bits
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ghr  <= '0;
      path <= '0;
    end else if (upd) begin
      ghr <= {ghr[GHL-2:0], taken};
      for (int i = GHL - 1; i > 0; i--) path[i] <= path[i-1];
      path[0] <= pc;
    end
  end
endmodule
