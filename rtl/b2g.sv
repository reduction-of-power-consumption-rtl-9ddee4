// Binary to Gray converter for one W-bit word (combinational).
//
// Bit 0 is kept and every higher bit is XORed with the bit below it:
//   g[0] = b[0],  g[i] = b[i] ^ b[i-1]   (i = 1 .. W-1)
// i.e. g = b ^ (b << 1). This is the bit ordering of the source's conversion
// result (9-bit input 100101100 gives 101110100). Gray coding of the flit is
// from the source; there is no clock, the output follows the input.
module b2g #(
  parameter int unsigned W = noc_coding_pkg::DEFAULT_W
) (
  input  logic [W-1:0] bin,   // binary word
  output logic [W-1:0] gray   // Gray-coded word
);
  always_comb gray = bin ^ {bin[W-2:0], 1'b0};
endmodule
