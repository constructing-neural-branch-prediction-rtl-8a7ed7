// bp_index_hash: row index of one weight column.
//
// The row of a weight table is selected by the branch address exclusive-ORed
// with the address of an earlier branch on the path (the PC XOR Path hash of
// the partially separated structure). Only the low IDX_BITS address bits take
// part, which is this design's choice of hash truncation.
// Purely combinational; no clock.
module bp_index_hash #(
  parameter int IDX_BITS = 8
) (
  input  logic [IDX_BITS-1:0] pc,        // low address bits of the branch being predicted
  input  logic [IDX_BITS-1:0] path_addr, // stored low address bits of an earlier branch
  output logic [IDX_BITS-1:0] idx        // row in the weight table
);
  always_comb idx = pc ^ path_addr;
endmodule
