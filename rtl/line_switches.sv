// Line-switch detector (combinational).
//
// Compares the present (Gray-coded, not yet inverted) word with the previous
// transmitted word. For each line it reports whether the line would switch,
// and for each of the W-1 adjacent line pairs whether the two previous values
// were equal. These two vectors are all the transition-type blocks need:
//   sw[i]  = cur[i] ^ prev[i]
//   peq[j] = ~(prev[j+1] ^ prev[j])          pair j = lines (j+1, j)
// The source only names this block; what it computes here is this design's
// reading of the name.
module line_switches #(
  parameter int unsigned W = noc_coding_pkg::DEFAULT_W
) (
  input  logic [W-1:0] cur,   // present word
  input  logic [W-1:0] prev,  // previous word on the link
  output logic [W-1:0] sw,    // line i would switch
  output logic [W-2:0] peq    // pair j had equal previous values
);
  always_comb begin
    sw  = cur ^ prev;
    peq = ~(prev[W-1:1] ^ prev[W-2:0]);
  end
endmodule
