// Top level: source-side encoder, link, destination-side decoder and LCD.
//
// A W-bit binary flit entering at in_data is encoded (Scheme III by default)
// onto the link lines (link_data plus the odd/even inversion flags), decoded
// back at the far end and shown, decoded and encoded, on a 16x2 character
// LCD. In the network the link would pass through routers; here the encoder
// output feeds the decoder directly, as in the source's block diagrams, and
// the link lines are brought out so that a router path can be placed between
// them in a larger design.
//
// Timing: a flit accepted at a rising edge appears on the link one cycle
// later and at out_data two cycles later (out_valid marks it). Reset is
// synchronous and active high. Ports in_data, out_data, clk and the LCD's
// ld1/rs/en signals follow the source's waveforms; the rest are this design's.
module noc_coding_top #(
  parameter int unsigned W            = noc_coding_pkg::DEFAULT_W,
  parameter int unsigned SCHEME       = 3,
  parameter int unsigned PWRON_CYC    = 750_000,
  parameter int unsigned SETUP_CYC    = 2,
  parameter int unsigned EN_CYC       = 12,
  parameter int unsigned CMD_WAIT_CYC = 2_000,
  parameter int unsigned CLR_WAIT_CYC = 82_000
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         link_valid,
  output logic [W-1:0] link_data,
  output logic         link_odd,
  output logic         link_even,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic [7:0]   ld1,       // LCD data bus
  output logic         rs,        // LCD register select
  output logic         en,        // LCD enable strobe
  output logic         lcd_frame_done
);
  encoder #(.W(W), .SCHEME(SCHEME)) u_enc (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_valid(link_valid), .link_data(link_data),
    .link_odd(link_odd), .link_even(link_even)
  );

  decoder #(.W(W)) u_dec (
    .clk(clk), .rst(rst), .in_valid(link_valid), .in_data(link_data),
    .in_odd(link_odd), .in_even(link_even),
    .out_valid(out_valid), .out_data(out_data)
  );

  lcd_ctrl #(
    .W(W), .PWRON_CYC(PWRON_CYC), .SETUP_CYC(SETUP_CYC), .EN_CYC(EN_CYC),
    .CMD_WAIT_CYC(CMD_WAIT_CYC), .CLR_WAIT_CYC(CLR_WAIT_CYC)
  ) u_lcd (
    .clk(clk), .rst(rst), .dec_word(out_data), .enc_word(link_data),
    .lcd_data(ld1), .lcd_rs(rs), .lcd_en(en), .frame_done(lcd_frame_done)
  );
endmodule
