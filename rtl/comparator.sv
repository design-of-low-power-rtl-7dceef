// comparator: unsigned magnitude comparator, lt = (a < b).
//
// The less-than output is the borrow out of a - b: a borrow chain runs from
// the least significant bit, and a borrow out of the top bit means a < b.
// Equal inputs give lt = 0. Only the less-than output is used in the decoder,
// where it drives the select lines of the selector and of the output mux; the
// borrow-chain structure is this design's choice. Purely combinational.
module comparator #(
  parameter int unsigned W = viterbi_pkg::SUM_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         lt
);
  logic [W:0] bw;  // bw[i]: borrow into bit i of a - b

  assign bw[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign bw[i+1] = (~a[i] & b[i]) | (~(a[i] ^ b[i]) & bw[i]);
  end

  assign lt = bw[W];
endmodule
