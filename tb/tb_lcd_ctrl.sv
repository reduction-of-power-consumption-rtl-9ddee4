// Testbench for lcd_ctrl with short delays. A monitor records every byte
// written (rs and data at the falling edge of en), the width of each en pulse
// and the time between writes. Checked: nothing is written before the
// power-on wait, the four initialisation commands with rs = 0, then two full
// refreshes showing "OUTPU=<dec_word>" and "ENCOD=<enc_word>"; the words of
// the second refresh change in the middle of it, which must not show until
// the refresh after.
module tb_lcd_ctrl;
  localparam int W = 9;
  localparam int PWRON = 40, SETUP = 2, EN = 3, CWAIT = 5, CLR = 11;
  logic clk = 0, rst, lcd_rs, lcd_en, frame_done;
  logic [W-1:0] dec_word, enc_word;
  logic [7:0] lcd_data;
  int checks = 0, failures = 0;
  int cyc = 0, en_rise = 0, last_fall = -1, nbytes = 0, frames = 0;
  logic [8:0] got [$];
  int gaps [$];

  lcd_ctrl #(.W(W), .PWRON_CYC(PWRON), .SETUP_CYC(SETUP), .EN_CYC(EN),
             .CMD_WAIT_CYC(CWAIT), .CLR_WAIT_CYC(CLR)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    logic en_d;
    cyc++;
    if (!rst) begin
      if (lcd_en && !en_d) en_rise = cyc;
      if (!lcd_en && en_d) begin
        checks++;
        if (cyc - en_rise != EN) begin failures++; $display("en pulse %0d cycles", cyc - en_rise); end
        got.push_back({lcd_rs, lcd_data});
        if (last_fall >= 0) gaps.push_back(cyc - last_fall);
        last_fall = cyc;
      end
      if (frame_done) frames++;
    end
    en_d = lcd_en;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_line(int base, logic line2, logic [W-1:0] word);
    string label = line2 ? "ENCOD=" : "OUTPU=";
    checks++;
    if (got[base] !== {1'b0, line2 ? 8'hC0 : 8'h80}) begin
      failures++; $display("byte %0d: address %h", base, got[base]);
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (got[base + 1 + k] !== {1'b1, 8'(label[k])}) failures++;
    end
    for (int b = 0; b < W; b++) begin
      checks++;
      if (got[base + 7 + b] !== {1'b1, word[W-1-b] ? 8'h31 : 8'h30}) begin
        failures++; $display("byte %0d: %h", base + 7 + b, got[base + 7 + b]);
      end
    end
  endfunction

  initial begin
    localparam int LINE = 7 + W;
    logic [W-1:0] d1, e1, d2, e2;
    d1 = 9'b101101100; e1 = 9'b101110000;
    d2 = 9'b010111100; e2 = 9'b000000111;
    rst = 1; dec_word = d1; enc_word = e1;
    repeat (2) @(posedge clk);
    rst = 0;
    // first write may not complete before the power-on wait
    wait (got.size() == 1);
    checks++; if (cyc < PWRON + 2) failures++;
    // change the words in the middle of the second refresh
    wait (got.size() == 4 + 2 * LINE + 5);
    dec_word = d2; enc_word = e2;
    wait (frames == 3);
    @(posedge clk);
    checks += 4;
    if (got[0] !== 9'h038) failures++;
    if (got[1] !== 9'h00C) failures++;
    if (got[2] !== 9'h006) failures++;
    if (got[3] !== 9'h001) failures++;
    for (int f = 0; f < 3; f++) begin
      expect_line(4 + f * 2 * LINE, 1'b0, f < 2 ? d1 : d2);
      expect_line(4 + f * 2 * LINE + LINE, 1'b1, f < 2 ? e1 : e2);
    end
    // write spacing: after clear the long wait, otherwise the command wait
    for (int i = 0; i < gaps.size(); i++) begin
      int want;
      want = SETUP + EN + ((i == 3) ? CLR : CWAIT) + 2;
      checks++; if (gaps[i] != want) begin failures++; $display("gap %0d: %0d", i, gaps[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
