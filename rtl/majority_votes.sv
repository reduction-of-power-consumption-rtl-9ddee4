// Majority votes: Scheme-I inversion decision (combinational).
//
// Scheme I works from Type-I information only and picks half (odd-line) or
// full inversion by majority:
//   full : more than half of the W lines would switch (2*nsw > W)
//   half : otherwise, if the Type-I pairs that half inversion removes are a
//          strict majority of the P = W-1 pairs (2*(n1 - no) > P)
//   none : otherwise
// n1 counts Type-I pairs, no the Type-I pairs half inversion would turn into
// Type II, nsw the switching lines. The source names the block, the two
// inversions and that it votes by majority; the thresholds are this design's.
module majority_votes #(
  parameter int unsigned W  = noc_coding_pkg::DEFAULT_W,
  parameter int unsigned CW = $clog2(W)
) (
  input  logic [CW-1:0]        n1,
  input  logic [CW-1:0]        no,
  input  logic [$clog2(W+1)-1:0] nsw,
  output logic                 odd_inv,
  output logic                 even_inv
);
  localparam int unsigned KW = $clog2(W + 1) + 2;

  logic [KW-1:0] gain;

  always_comb begin
    gain = KW'(n1) - KW'(no);
    odd_inv  = 1'b0;
    even_inv = 1'b0;
    if ((KW'(nsw) << 1) > KW'(W)) begin
      odd_inv  = 1'b1;
      even_inv = 1'b1;
    end else if ((gain << 1) > KW'(W - 1)) begin
      odd_inv  = 1'b1;
    end
  end
endmodule
