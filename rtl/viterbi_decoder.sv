// viterbi_decoder: one add-compare-select step of a Viterbi decoder with its
// branch metric units, survivor memory and decoded-output path.
//
// Two branches enter the state being updated. For each, a branch metric unit
// counts the bits in which the received sequence (bmuX_a) differs from the
// code sequence expected on that branch (bmuX_b), one bit pair per clock,
// giving a BM_W-bit Hamming distance bmX. The add-compare-select unit adds
// each branch metric to the path metric of the state the branch leaves
// (pm0, pm1, supplied from outside), compares the two sums and passes the
// smaller as new_pm; its less-than output lt (sum0 < sum1) also steers the
// decoded-output mux. Every rising clock edge shifts new_pm, bit by bit, into
// the four shift registers of the survivor memory (outputs smu_q, smu_qb,
// SMU_DEPTH cycles later; smu_taps shows every stage, register i in
// bits [i*SMU_DEPTH +: SMU_DEPTH]) and shifts the bit chosen from dec_a
// (lt = 1) or dec_b (lt = 0) into a two-flip-flop register ending at dout.
//
// Timing: bm0/bm1 are registered (they include the bit pair of the previous
// edge); sum0, sum1, lt and new_pm follow them and pm0/pm1 combinationally;
// smu_q is new_pm delayed by SMU_DEPTH edges; dout is the mux output delayed
// by OUT_DEPTH (2) edges. bm_clr clears both counters at the next edge.
//
// The structure (two BMUs, two 3-bit adders, comparator, 4-bit selector, SMU
// of four SISO registers, 2:1 mux and two flip-flops) follows the circuit. Its
// own choices: one clock for everything, synchronous counters with a clear, an
// asynchronous active-low reset, and path metrics and mux inputs taken as
// ports because the circuit draws them as inputs.
module viterbi_decoder #(
  parameter int unsigned BM_W      = viterbi_pkg::BM_W,
  parameter int unsigned SMU_DEPTH = viterbi_pkg::SMU_DEPTH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bm_clr,
  input  logic            bmu0_a,
  input  logic            bmu0_b,
  input  logic            bmu0_t,
  input  logic            bmu1_a,
  input  logic            bmu1_b,
  input  logic            bmu1_t,
  input  logic [BM_W-1:0] pm0,
  input  logic [BM_W-1:0] pm1,
  input  logic            dec_a,
  input  logic            dec_b,
  output logic [BM_W-1:0] bm0,
  output logic [BM_W-1:0] bm1,
  output logic [BM_W:0]   sum0,
  output logic [BM_W:0]   sum1,
  output logic            lt,
  output logic [BM_W:0]   new_pm,
  output logic [BM_W:0]   smu_q,
  output logic [BM_W:0]   smu_qb,
  output logic [(BM_W+1)*SMU_DEPTH-1:0] smu_taps,
  output logic            dout
);
  bmu #(.W(BM_W)) u_bmu0 (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (bm_clr),
    .a    (bmu0_a),
    .b    (bmu0_b),
    .t    (bmu0_t),
    .q    (bm0)
  );

  bmu #(.W(BM_W)) u_bmu1 (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (bm_clr),
    .a    (bmu1_a),
    .b    (bmu1_b),
    .t    (bmu1_t),
    .q    (bm1)
  );

  acsu #(.W(BM_W)) u_acsu (
    .bm0   (bm0),
    .bm1   (bm1),
    .pm0   (pm0),
    .pm1   (pm1),
    .sum0  (sum0),
    .sum1  (sum1),
    .lt    (lt),
    .sel_pm(new_pm)
  );

  smu #(.N(BM_W+1), .DEPTH(SMU_DEPTH)) u_smu (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (new_pm),
    .q    (smu_q),
    .qb   (smu_qb),
    .taps (smu_taps)
  );

  decode_out #(.DEPTH(viterbi_pkg::OUT_DEPTH)) u_out (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (dec_a),
    .b    (dec_b),
    .sel  (lt),
    .dout (dout)
  );
endmodule
