// afpbp_column: weight table of one history position for the adaptive
// four-state perceptron predictor.
//
// Each of the 2^IDX_BITS rows stores a (2m+2)-bit weight: 2-bit state code
// and 2m-bit payload. The row chosen by idx is read combinationally and
// decoded by afpbp_weight_logic into a contribution to the sum; when train is
// high at the rising clock edge the row is rewritten with the trained weight
// and state produced by that same logic. Every weight starts in state 0 with
// WT = WNT = 0 after reset (the encoding starts weights in the separated
// state; clearing them is this design's choice).
module afpbp_column #(
  parameter int M        = 4,
  parameter int THW      = 3,
  parameter int IDX_BITS = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [IDX_BITS-1:0]   idx,
  input  logic                  hist,    // 1 = taken history
  output logic signed [2*M:0]   contrib, // contribution to the sum
  output logic [1:0]            state,   // state code of the row read
  input  logic                  train,
  input  logic                  taken
);
  localparam int NROWS = 1 << IDX_BITS;

  logic [1:0]     st_mem [NROWS];
  logic [2*M-1:0] pl_mem [NROWS];
  logic [1:0]     st_next;
  logic [2*M-1:0] pl_next;

  assign state = st_mem[idx];

  afpbp_weight_logic #(.M(M), .THW(THW)) u_logic (
    .st_in(st_mem[idx]), .pl_in(pl_mem[idx]), .hist, .taken,
    .contrib, .st_next, .pl_next
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NROWS; r++) begin
        st_mem[r] <= '0;
        pl_mem[r] <= '0;
      end
    end else if (train) begin
      st_mem[idx] <= st_next;
      pl_mem[idx] <= pl_next;
    end
  end
endmodule
