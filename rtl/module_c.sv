// Module C: Scheme-III inversion decision (combinational).
//
// From the counts of the transition-type blocks it estimates the coupling cost
// of sending the present word in each of four forms and picks the cheapest.
// Cost weights: Type I = 1, Type II = 2, Types III and IV = 0. With P = W-1
// adjacent pairs and
//   n1 = Type-I pairs          n2 = Type-II pairs
//   n4 = Type-IV pairs with differing previous values (T4**)
//   no = Type-I pairs turning Type II under odd inversion  (Te, odd side)
//   ne = Type-I pairs turning Type II under even inversion (Te, even side)
// the costs are
//   none : n1 + 2*n2
//   odd  : (P - n1) + 2*no      (every non-Type-I pair becomes Type I)
//   even : (P - n1) + 2*ne
//   full : n1 + 2*n4            (Type I stays, Type II/III become IV)
// Ties go to the form that inverts fewer lines (none, odd, even, full).
// The source gives the block's name, its two outputs (odd and even invert) and
// that it decides the type of inversion; the cost model is this design's.
module module_c #(
  parameter int unsigned P  = noc_coding_pkg::DEFAULT_W - 1,
  parameter int unsigned CW = $clog2(P + 1)
) (
  input  logic [CW-1:0] n1,
  input  logic [CW-1:0] n2,
  input  logic [CW-1:0] n4,
  input  logic [CW-1:0] no,
  input  logic [CW-1:0] ne,
  output logic          odd_inv,
  output logic          even_inv
);
  import noc_coding_pkg::*;

  localparam int unsigned KW = CW + 2;   // holds up to 3*P

  logic [KW-1:0] c_none, c_odd, c_even, c_full, best;
  inv_e          choice;

  always_comb begin
    c_none = KW'(n1) + (KW'(n2) << 1);
    c_odd  = KW'(P) - KW'(n1) + (KW'(no) << 1);
    c_even = KW'(P) - KW'(n1) + (KW'(ne) << 1);
    c_full = KW'(n1) + (KW'(n4) << 1);

    choice = INV_NONE;
    best   = c_none;
    if (c_odd < best)  begin choice = INV_ODD;  best = c_odd;  end
    if (c_even < best) begin choice = INV_EVEN; best = c_even; end
    if (c_full < best) begin choice = INV_FULL; best = c_full; end

    odd_inv  = choice[0];
    even_inv = choice[1];
  end

  // The chosen form never costs more than sending the word unchanged.
  always_comb assert (best <= c_none);
endmodule
