// Inversion stage and XOR gates (combinational).
//
// Builds the inversion mask from the two flags and XORs it onto the word:
//   out[i] = in[i] ^ (i odd ? odd_inv : even_inv)
// With both flags set the whole word is inverted. The decoder uses the same
// block to undo the inversion. Odd/even inversion by XOR gates is from the
// source; line 0 counting as even is this design's convention.
module invert_xor #(
  parameter int unsigned W = noc_coding_pkg::DEFAULT_W
) (
  input  logic [W-1:0] din,
  input  logic         odd_inv,
  input  logic         even_inv,
  output logic [W-1:0] dout
);
  logic [W-1:0] mask;

  always_comb begin
    for (int i = 0; i < W; i++) mask[i] = (i % 2 == 1) ? odd_inv : even_inv;
    dout = din ^ mask;
  end
endmodule
