// viterbi_pkg: widths shared by the blocks of the Viterbi decoder stage.
//
// BM_W is the width of a branch metric, which is also the width of a previous
// path metric and of each adder's operands ("3 bit adder" in the block diagram).
// An adder result carries one more bit, so the selector and the survivor memory
// are SUM_W = BM_W + 1 = 4 bits wide, matching the four 2:1 multiplexers of the
// selector and the four shift registers of the survivor memory. SMU_DEPTH is the
// length of each survivor shift register (four flip-flops per stage).
package viterbi_pkg;
  localparam int unsigned BM_W      = 3;
  localparam int unsigned SUM_W     = BM_W + 1;
  localparam int unsigned SMU_DEPTH = 4;
  localparam int unsigned OUT_DEPTH = 2;
endpackage
