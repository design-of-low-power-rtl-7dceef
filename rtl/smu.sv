// smu: survivor memory unit, N parallel SISO shift registers of DEPTH stages.
//
// Bit i of the selected path metric d enters shift register i on every rising
// clock edge; q[i] and qb[i] are that register's serial output and its
// inverse, DEPTH cycles after the bit entered. taps gives every stage, register
// i in taps[i*DEPTH +: DEPTH] (see siso_shift_register for the order). Four
// registers of four flip-flops, shifting on every clock with no enable, follow
// the circuit; the register length is set there by the encoder, which is not
// specified, so DEPTH = 4 as drawn. rst_n (asynchronous, active low) is this
// design's addition.
module smu #(
  parameter int unsigned N     = viterbi_pkg::SUM_W,
  parameter int unsigned DEPTH = viterbi_pkg::SMU_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0]       d,
  output logic [N-1:0]       q,
  output logic [N-1:0]       qb,
  output logic [N*DEPTH-1:0] taps
);
  for (genvar i = 0; i < N; i++) begin : g_reg
    siso_shift_register #(.DEPTH(DEPTH)) u_siso (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (d[i]),
      .q    (q[i]),
      .qb   (qb[i]),
      .taps (taps[i*DEPTH +: DEPTH])
    );
  end
endmodule
