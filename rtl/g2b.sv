// Gray to binary converter, the inverse of b2g (combinational).
//
//   b[0] = g[0],  b[i] = g[i] ^ b[i-1]
// The ripple runs from bit 0 upwards because b2g XORs each bit with the one
// below it. Used by the decoder; the exact form is this design's own, the
// source only states that the destination decodes the data.
module g2b #(
  parameter int unsigned W = noc_coding_pkg::DEFAULT_W
) (
  input  logic [W-1:0] gray,  // Gray-coded word
  output logic [W-1:0] bin    // recovered binary word
);
  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int i = 0; i < W; i++) begin
      acc    = acc ^ gray[i];
      bin[i] = acc;
    end
  end
endmodule
