// Module A: Scheme-II inversion decision (combinational).
//
// Scheme II chooses between no inversion, odd-line inversion and full
// inversion. Same cost model as Module C (Type I = 1, Type II = 2), P = W-1:
//   none : n1 + 2*n2
//   odd  : (P - n1) + 2*no
//   full : n1 + 2*n4
// Ties go to the form that inverts fewer lines. The source names the block and
// the two inversions it picks between; the rule is this design's.
module module_a #(
  parameter int unsigned P  = noc_coding_pkg::DEFAULT_W - 1,
  parameter int unsigned CW = $clog2(P + 1)
) (
  input  logic [CW-1:0] n1,
  input  logic [CW-1:0] n2,
  input  logic [CW-1:0] n4,
  input  logic [CW-1:0] no,
  output logic          odd_inv,
  output logic          even_inv
);
  import noc_coding_pkg::*;

  localparam int unsigned KW = CW + 2;

  logic [KW-1:0] c_none, c_odd, c_full, best;
  inv_e          choice;

  always_comb begin
    c_none = KW'(n1) + (KW'(n2) << 1);
    c_odd  = KW'(P) - KW'(n1) + (KW'(no) << 1);
    c_full = KW'(n1) + (KW'(n4) << 1);

    choice = INV_NONE;
    best   = c_none;
    if (c_odd < best)  begin choice = INV_ODD;  best = c_odd;  end
    if (c_full < best) begin choice = INV_FULL; best = c_full; end

    odd_inv  = choice[0];
    even_inv = choice[1];
  end

  always_comb assert (best <= c_none);
endmodule
