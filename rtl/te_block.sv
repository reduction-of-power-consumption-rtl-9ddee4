// Te block: Type-I pairs that a one-sided inversion would turn into Type II.
//
// Every adjacent pair holds one odd-indexed and one even-indexed line. When
// only the line that is NOT inverted switches and the pair's previous values
// differ, inverting the other line makes both switch in opposite directions.
//   EVEN_INV = 1 (even lines inverted):  flag when only the odd line switches
//   EVEN_INV = 0 (odd lines inverted):   flag when only the even line switches
// In pair j the odd line is j+1 for even j and j for odd j.
// The source adds a "Te" block for the even inversion; the same block with
// EVEN_INV = 0 serves the odd inversion. Its exact condition is this design's.
module te_block #(
  parameter int unsigned W        = noc_coding_pkg::DEFAULT_W,
  parameter bit          EVEN_INV = 1'b1
) (
  input  logic [W-1:0] sw,    // line switches
  input  logic [W-2:0] peq,   // previous pair values equal
  output logic [W-2:0] te     // pair j would become Type II
);
  always_comb begin
    for (int j = 0; j < W - 1; j++) begin
      logic odd_sw, even_sw;
      odd_sw  = (j % 2 == 0) ? sw[j+1] : sw[j];
      even_sw = (j % 2 == 0) ? sw[j]   : sw[j+1];
      if (EVEN_INV) te[j] = odd_sw & ~even_sw & ~peq[j];
      else          te[j] = even_sw & ~odd_sw & ~peq[j];
    end
  end
endmodule
