// Full-size testbench: noc_coding_top with every parameter at its default
// (9-bit flits, Scheme III, LCD delays for a 50 MHz clock). It sends the flits
// 172, 174 and 188, checks each round trip and link word against the
// reference encoder, then waits for the first complete LCD refresh (about
// 0.9 million cycles after reset) and checks the power-on wait, the
// initialisation commands and both display lines.
module tb_noc_coding_top_full;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic clk = 0, rst, in_valid, link_valid, link_odd, link_even, out_valid;
  logic rs, en, lcd_frame_done;
  logic [W-1:0] in_data, link_data, out_data;
  logic [7:0] ld1;
  int checks = 0, failures = 0;
  longint cyc = 0, first_en = -1;
  logic [8:0] lcd_log [$];

  noc_coding_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) begin
    cyc++;
    if (en && first_en < 0) first_en = cyc;
  end
  always @(negedge en) if (!rst) lcd_log.push_back({rs, ld1});

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t link_ref = '0;
    logic [W-1:0] flits [3] = '{9'd172, 9'd174, 9'd188};
    rst = 1; in_valid = 0; in_data = '0;
    @(posedge clk); #1;
    rst = 0;
    cyc = 0;
    for (int n = 0; n < 3; n++) begin
      logic [1:0] c;
      automatic word_t g = ref_gray(word_t'(flits[n]), W);
      c = ref_choice(link_ref, g, W, 3);
      link_ref = ref_inv(g, c[0], c[1], W);
      in_valid = 1; in_data = flits[n];
      @(posedge clk); #1;
      in_valid = 0;
      checks++; if (!link_valid || link_data !== link_ref[W-1:0] || {link_even, link_odd} !== c) failures++;
      @(posedge clk); #1;
      checks++; if (!out_valid || out_data !== flits[n]) failures++;
      $display("flit %0d -> link %b flags %b -> %0d", flits[n], link_data, c, out_data);
    end
    @(posedge lcd_frame_done);
    @(posedge clk);
    $display("first LCD write at cycle %0d, refresh done at cycle %0d", first_en, cyc);
    checks++; if (first_en < 750_000) failures++;
    checks += 5;
    if (lcd_log.size() != 4 + 2 * (7 + W)) failures++;
    if (lcd_log[0] !== 9'h038 || lcd_log[1] !== 9'h00C || lcd_log[2] !== 9'h006 || lcd_log[3] !== 9'h001)
      failures++;
    if (lcd_log[4] !== 9'h080) failures++;
    if (lcd_log[4 + 7 + W] !== 9'h0C0) failures++;
    begin
      automatic string s1 = "", s2 = "";
      automatic string w1 = "OUTPU=", w2 = "ENCOD=";
      for (int b = W - 1; b >= 0; b--) begin
        w1 = {w1, flits[2][b] ? "1" : "0"};
        w2 = {w2, link_ref[b] ? "1" : "0"};
      end
      for (int k = 0; k < 6 + W; k++) begin
        s1 = {s1, string'(lcd_log[5 + k][7:0])};
        s2 = {s2, string'(lcd_log[5 + 7 + W + k][7:0])};
      end
      $display("LCD line 1: %s", s1);
      $display("LCD line 2: %s", s2);
      if (s1 != w1 || s2 != w2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
