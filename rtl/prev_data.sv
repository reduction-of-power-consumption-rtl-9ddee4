// Previous-data (feedback) register of the encoder.
//
// Holds the word last driven onto the link data lines together with its two
// inversion flags; the encoder classifies the next word's transitions against
// it. It therefore doubles as the link output register. Loads on `load` at the
// rising clock edge; synchronous active-high reset clears it to all zeros,
// which is also what the link lines are assumed to carry after reset.
// The feedback path is from the source; reset value and the flags being kept
// alongside the data are this design's choices.
module prev_data #(
  parameter int unsigned W = noc_coding_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,       // synchronous, active high
  input  logic         load,      // capture d/flags this cycle
  input  logic [W-1:0] d,         // encoded word to transmit
  input  logic         odd_in,    // odd-line inversion flag of d
  input  logic         even_in,   // even-line inversion flag of d
  output logic [W-1:0] q,         // previous (currently transmitted) word
  output logic         odd_q,
  output logic         even_q
);
  always_ff @(posedge clk) begin
    if (rst) begin
      q      <= '0;
      odd_q  <= 1'b0;
      even_q <= 1'b0;
    end else if (load) begin
      q      <= d;
      odd_q  <= odd_in;
      even_q <= even_in;
    end
  end
endmodule
