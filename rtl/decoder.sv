// Flit decoder for the destination network interface.
//
// Undoes the encoder: the two inversion flags received with the word select
// the lines to flip back (same XOR stage as the encoder), then the Gray code
// is converted back to binary. No state of the previous word is needed, so
// the decoder works for every scheme.
//
// Timing: in_* sampled at a rising clock edge, out_data valid after that edge
// with out_valid high for one cycle (one cycle latency). Synchronous
// active-high reset. The source names the decoder and shows it fed straight
// from the XOR gates; its insides, latency and reset are this design's.
module decoder #(
  parameter int unsigned W = noc_coding_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,   // encoded data lines
  input  logic         in_odd,    // odd lines inverted
  input  logic         in_even,   // even lines inverted
  output logic         out_valid,
  output logic [W-1:0] out_data   // recovered binary flit
);
  logic [W-1:0] gray, bin;

  invert_xor #(.W(W)) u_inv (.din(in_data), .odd_inv(in_odd), .even_inv(in_even),
                             .dout(gray));
  g2b        #(.W(W)) u_g2b (.gray(gray), .bin(bin));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= bin;
    end
  end

  // out_valid follows in_valid by exactly one cycle; data holds when idle.
  a_valid: assert property (@(posedge clk) disable iff (rst) in_valid |=> out_valid);
  a_hold:  assert property (@(posedge clk) disable iff (rst) !in_valid |=> $stable(out_data));
endmodule
