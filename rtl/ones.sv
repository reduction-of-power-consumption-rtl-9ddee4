// Ones counter (combinational population count).
//
// Returns how many of the N flag bits are set. Used after every transition-type
// block, as in the source ("detection of number of 1's").
module ones #(
  parameter int unsigned N  = noc_coding_pkg::DEFAULT_W - 1,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  flags,
  output logic [CW-1:0] count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++) count = count + CW'(flags[i]);
  end
endmodule
