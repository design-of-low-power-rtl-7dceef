// siso_shift_register: one survivor memory stage, a serial-in serial-out
// shift register of DEPTH D flip-flops.
//
// On every rising clock edge the input d enters the first flip-flop and each
// flip-flop passes its bit to the next, so q is d delayed by DEPTH cycles. qb
// is the inverted output of the last flip-flop. taps shows every flip-flop:
// taps[DEPTH-1] is the first (one cycle after d), taps[0] is the last (= q).
// The chain of four flip-flops with its true and inverted outputs follows the
// circuit; the asynchronous active-low reset rst_n is this design's addition.
module siso_shift_register #(
  parameter int unsigned DEPTH = viterbi_pkg::SMU_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             d,
  output logic             q,
  output logic             qb,
  output logic [DEPTH-1:0] taps
);
  logic [DEPTH:0] chain;  // chain[DEPTH] = d, chain[i] = flip-flop output

  assign chain[DEPTH] = d;

  for (genvar i = DEPTH - 1; i >= 1; i--) begin : g_ff
    dff u_dff (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (chain[i+1]),
      .q    (chain[i]),
      .qb   ()
    );
  end

  dff u_last (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (chain[1]),
    .q    (chain[0]),
    .qb   (qb)
  );

  assign taps = chain[DEPTH-1:0];
  assign q    = chain[0];
endmodule
