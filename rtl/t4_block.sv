// T4** block: detector of Type-IV pairs that a full inversion would spoil.
//
// A Type-IV pair (no line switches) whose two previous values differ (01 or
// 10) becomes Type II when the whole word is inverted:
//   t4[j] = ~sw[j+1] & ~sw[j] & ~peq[j]
// The encoder weighs these against the Type-II pairs a full inversion removes.
// Name from the source; which Type-IV pairs the "**" selects is this design's
// reading.
module t4_block #(
  parameter int unsigned W = noc_coding_pkg::DEFAULT_W
) (
  input  logic [W-1:0] sw,    // line switches
  input  logic [W-2:0] peq,   // previous pair values equal
  output logic [W-2:0] t4     // pair j is Type IV with differing values
);
  always_comb t4 = ~sw[W-1:1] & ~sw[W-2:0] & ~peq;
endmodule
