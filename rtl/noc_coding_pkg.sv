// Shared types and constants of the coupling-aware link encoder.
//
// The link carries W data lines plus two inversion flags. For every pair of
// adjacent data lines the transition from the previous to the present word is
// classified as
//   Type I   : exactly one of the two lines switches
//   Type II  : both switch in opposite directions (worst coupling case)
//   Type III : both switch in the same direction
//   Type IV  : neither switches
// The encoder chooses an inversion (none, odd lines, even lines, all lines)
// that minimises a coupling cost of 1 per Type I and 2 per Type II pair.
// The Type I..IV names follow the source description; the cost weights and
// the inversion encoding are this design's own choices.
package noc_coding_pkg;

  // Data width of the link; the source's waveforms show 9-bit words [8:0].
  parameter int unsigned DEFAULT_W = 9;

  // Inversion chosen for one word: {even_inv, odd_inv}.
  typedef enum logic [1:0] {
    INV_NONE = 2'b00,
    INV_ODD  = 2'b01,
    INV_EVEN = 2'b10,
    INV_FULL = 2'b11
  } inv_e;

endpackage
