// bp_adder_tree: sums N signed terms into the perceptron output.
//
// The selected weights of all history positions and the bias are added into
// one signed sum; the prediction is taken when the sum is >= 0. Written as a
// plain combinational sum that synthesis maps to an adder tree; SUMW must
// hold N * 2^(IN_W-1) without overflow (the caller sizes it).
module bp_adder_tree #(
  parameter int N    = 65,
  parameter int IN_W = 8,
  parameter int SUMW = 16
) (
  input  logic [N-1:0][IN_W-1:0] terms,  // each term is IN_W-bit two's complement
  output logic signed [SUMW-1:0]        sum
);
  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum += SUMW'($signed(terms[i]));
  end
endmodule
