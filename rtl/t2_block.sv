// T2 block: Type-II transition detector (combinational).
//
// Pair j has a Type-II transition when both lines switch in opposite
// directions. Both switching with different previous values is exactly that:
//   t2[j] = sw[j+1] & sw[j] & ~peq[j]
// A full inversion turns these pairs into Type IV. Name from the source; the
// logic is this design's.
module t2_block #(
  parameter int unsigned W = noc_coding_pkg::DEFAULT_W
) (
  input  logic [W-1:0] sw,    // line switches
  input  logic [W-2:0] peq,   // previous pair values equal
  output logic [W-2:0] t2     // pair j is Type II
);
  always_comb t2 = sw[W-1:1] & sw[W-2:0] & ~peq;
endmodule
