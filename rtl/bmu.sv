// bmu: branch metric unit, the Hamming distance between a received and an
// expected bit sequence.
//
// One received bit (a) and the matching expected bit (b) are presented per
// clock. Their XOR is 1 where they differ, and it enables a W-bit counter of T
// flip-flops (tcounter), so after n bits the count q holds the number of
// positions in which the two sequences differ (modulo 2**W). q is registered:
// it includes the bit pair present at the previous rising edge. The T input t
// gates the count; the circuit ties it high. clr starts a new branch (count 0
// at the next edge, ignoring that cycle's bits); rst_n is an asynchronous
// active-low reset.
//
// Following the circuit: XOR gate, three-bit counter of T flip-flops, pins a,
// b, T and q2..q0. This design's own choice: the XOR enables a counter on the
// common clock instead of clocking a ripple counter directly, so that two
// mismatching bits in a row count twice; and the clear and reset.
module bmu #(
  parameter int unsigned W = viterbi_pkg::BM_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         a,
  input  logic         b,
  input  logic         t,
  output logic [W-1:0] q
);
  logic mismatch;

  assign mismatch = a ^ b;

  tcounter #(.W(W)) u_counter (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .en   (t & mismatch),
    .q    (q)
  );
endmodule
