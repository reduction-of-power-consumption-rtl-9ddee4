// TY block: Type-I transition detector (combinational).
//
// Pair j (lines j+1 and j) has a Type-I transition when exactly one of the two
// lines switches: ty[j] = sw[j+1] ^ sw[j]. One flag per adjacent pair, W-1 in
// all; the Ones block counts them. Block name and transition type are from the
// source; the per-pair flag vector as output is this design's choice.
module ty_block #(
  parameter int unsigned W = noc_coding_pkg::DEFAULT_W
) (
  input  logic [W-1:0] sw,    // line switches
  output logic [W-2:0] ty     // pair j is Type I
);
  always_comb ty = sw[W-1:1] ^ sw[W-2:0];
endmodule
