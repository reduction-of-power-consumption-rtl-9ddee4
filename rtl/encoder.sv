// Coupling-aware flit encoder for the source network interface.
//
// Each accepted W-bit flit is Gray coded, then compared line by line with the
// word currently on the link (the previous-data register). Transition-type
// blocks flag every adjacent line pair, Ones blocks count the flags, and a
// decision block picks the inversion that lowers the coupling cost. The Gray
// word is XORed with that inversion and loaded into the link register together
// with the two inversion flags.
//
//   SCHEME = 3 (default, Scheme III): Module C, none / odd / even / full
//   SCHEME = 2 (Scheme II)          : Module A, none / odd / full
//   SCHEME = 1 (Scheme I)           : majority votes, none / half / full
//
// Timing: in_valid/in_data are sampled at a rising clock edge; the encoded
// word appears on link_* after that edge (one cycle latency) with out_valid
// high for one cycle. One flit per cycle, no back-pressure. The link holds its
// value between flits. Reset (synchronous, active high) clears the link to 0.
// The chain Gray code -> line switches -> type blocks -> Ones -> decision ->
// inversion -> XOR -> previous-data feedback follows the source's block
// diagrams; the handshake, latency and reset are this design's choices.
module encoder #(
  parameter int unsigned W      = noc_coding_pkg::DEFAULT_W,
  parameter int unsigned SCHEME = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,    // binary flit
  output logic         out_valid,
  output logic [W-1:0] link_data,  // encoded data lines
  output logic         link_odd,   // odd lines of link_data are inverted
  output logic         link_even   // even lines of link_data are inverted
);
  localparam int unsigned P  = W - 1;
  localparam int unsigned CW = $clog2(P + 1);

  logic [W-1:0]  gray, sw, enc;
  logic [P-1:0]  peq, f_ty, f_t2, f_t4, f_to, f_te;
  logic [CW-1:0] n1, n2, n4, no, ne;
  logic          odd_inv, even_inv;

  b2g           #(.W(W)) u_b2g  (.bin(in_data), .gray(gray));
  line_switches #(.W(W)) u_ls   (.cur(gray), .prev(link_data), .sw(sw), .peq(peq));

  ty_block #(.W(W))               u_ty (.sw(sw), .ty(f_ty));
  te_block #(.W(W), .EVEN_INV(0)) u_to (.sw(sw), .peq(peq), .te(f_to));
  ones     #(.N(P))               u_n1 (.flags(f_ty), .count(n1));
  ones     #(.N(P))               u_no (.flags(f_to), .count(no));

  generate
    if (SCHEME >= 2) begin : g_t24
      t2_block #(.W(W)) u_t2 (.sw(sw), .peq(peq), .t2(f_t2));
      t4_block #(.W(W)) u_t4 (.sw(sw), .peq(peq), .t4(f_t4));
      ones     #(.N(P)) u_n2 (.flags(f_t2), .count(n2));
      ones     #(.N(P)) u_n4 (.flags(f_t4), .count(n4));
    end else begin : g_no_t24
      assign f_t2 = '0;
      assign f_t4 = '0;
      assign n2   = '0;
      assign n4   = '0;
    end

    if (SCHEME == 3) begin : g_s3
      te_block #(.W(W), .EVEN_INV(1)) u_te (.sw(sw), .peq(peq), .te(f_te));
      ones     #(.N(P))               u_ne (.flags(f_te), .count(ne));
      module_c #(.P(P)) u_dec (.n1(n1), .n2(n2), .n4(n4), .no(no), .ne(ne),
                               .odd_inv(odd_inv), .even_inv(even_inv));
    end else if (SCHEME == 2) begin : g_s2
      assign f_te = '0;
      assign ne   = '0;
      module_a #(.P(P)) u_dec (.n1(n1), .n2(n2), .n4(n4), .no(no),
                               .odd_inv(odd_inv), .even_inv(even_inv));
    end else begin : g_s1
      logic [$clog2(W+1)-1:0] nsw;
      assign f_te = '0;
      assign ne   = '0;
      ones #(.N(W)) u_nsw (.flags(sw), .count(nsw));
      majority_votes #(.W(W)) u_dec (.n1(n1), .no(no), .nsw(nsw),
                                     .odd_inv(odd_inv), .even_inv(even_inv));
    end
  endgenerate

  invert_xor #(.W(W)) u_inv (.din(gray), .odd_inv(odd_inv), .even_inv(even_inv),
                             .dout(enc));

  prev_data #(.W(W)) u_prev (
    .clk(clk), .rst(rst), .load(in_valid),
    .d(enc), .odd_in(odd_inv), .even_in(even_inv),
    .q(link_data), .odd_q(link_odd), .even_q(link_even)
  );

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  // The link holds its word and flags while no flit is accepted.
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           !in_valid |=> $stable({link_data, link_odd, link_even}));

  initial assert (SCHEME >= 1 && SCHEME <= 3 && W >= 2);
endmodule
