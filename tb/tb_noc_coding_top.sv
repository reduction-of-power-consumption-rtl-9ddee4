// End-to-end testbench for noc_coding_top with short LCD delays.
// Random flits (with idle cycles) and directed runs go in; every flit must come
// out of the decoder two cycles later, and the link word must match the
// reference encoder one cycle after acceptance. The test counts how often each
// mechanism happened and fails if one never did: each of the four inversions
// (none, odd, even, full), idle cycles with the link held, a reset mid-stream,
// the LCD initialisation (0x38 first) and complete LCD refreshes showing the
// decoded and encoded words.
module tb_noc_coding_top;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic clk = 0, rst, in_valid, link_valid, link_odd, link_even, out_valid;
  logic rs, en, lcd_frame_done;
  logic [W-1:0] in_data, link_data, out_data;
  logic [7:0] ld1;
  int checks = 0, failures = 0;
  int n_inv [4] = '{0, 0, 0, 0};
  int n_idle = 0, n_reset = 0, n_frames = 0, n_flits = 0;
  logic [8:0] lcd_log [$];

  noc_coding_top #(.PWRON_CYC(30), .SETUP_CYC(1), .EN_CYC(2),
                   .CMD_WAIT_CYC(3), .CLR_WAIT_CYC(8)) dut (.*);

  always #5 clk = ~clk;

  // LCD monitor: bytes at the falling edge of en
  always @(negedge en) if (!rst) lcd_log.push_back({rs, ld1});
  always @(posedge clk) if (lcd_frame_done) n_frames++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t link_ref;
  logic [W-1:0] pipe_d [2];
  logic         pipe_v [2];

  task automatic send(input logic v, input logic [W-1:0] d);
    logic [1:0] c;
    in_valid = v; in_data = d;
    if (v) begin
      word_t g = ref_gray(word_t'(d), W);
      c = ref_choice(link_ref, g, W, 3);
      link_ref = ref_inv(g, c[0], c[1], W);
      n_inv[c]++;
      n_flits++;
    end else n_idle++;
    @(posedge clk); #1;
    pipe_v[1] = pipe_v[0]; pipe_d[1] = pipe_d[0];
    pipe_v[0] = v;        if (v) pipe_d[0] = d;
    checks += 3;
    if (link_valid !== pipe_v[0]) failures++;
    if (link_data !== link_ref[W-1:0]) begin
      failures++; $display("link %b want %b", link_data, link_ref[W-1:0]);
    end
    if (out_valid !== pipe_v[1] || (pipe_v[1] && out_data !== pipe_d[1])) begin
      failures++; $display("out %b/%b want %b/%b", out_valid, out_data, pipe_v[1], pipe_d[1]);
    end
  endtask

  task automatic do_reset();
    rst = 1; in_valid = 0;
    @(posedge clk); #1;
    rst = 0;
    link_ref = '0; pipe_v = '{0, 0}; pipe_d = '{'0, '0};
    checks++;
    if (link_data !== '0 || out_data !== '0 || link_valid || out_valid) failures++;
  endtask

  initial begin
    do_reset();
    // the waveform inputs 172, 174, 188 and the Gray example word
    send(1, 9'd172); send(1, 9'd174); send(1, 9'd188); send(1, 9'b011010111);
    for (int n = 0; n < 3000; n++) send(($urandom % 5) != 0, W'($urandom));
    // reset in the middle of traffic, then continue
    do_reset(); n_reset++;
    for (int n = 0; n < 500; n++) send(1'b1, W'($urandom));
    // hold a word steady until the LCD shows it
    send(1'b1, 9'b101101100);
    begin
      automatic int f0 = n_frames;
      while (n_frames < f0 + 2) send(1'b0, '0);
    end
    // the last refresh must show the held decoded and encoded words
    begin
      automatic int base = lcd_log.size() - 2 * (7 + W);
      automatic string l1 = "OUTPU=", l2 = "ENCOD=";
      automatic logic [W-1:0] dw = 9'b101101100, ew = link_ref[W-1:0];
      checks += 3;
      if (lcd_log[0] !== 9'h038) failures++;
      if (lcd_log[base] !== 9'h080) failures++;
      if (lcd_log[base + 7 + W] !== 9'h0C0) failures++;
      for (int k = 0; k < 6; k++) begin
        checks += 2;
        if (lcd_log[base + 1 + k] !== {1'b1, 8'(l1[k])}) failures++;
        if (lcd_log[base + 8 + W + k] !== {1'b1, 8'(l2[k])}) failures++;
      end
      for (int b = 0; b < W; b++) begin
        checks += 2;
        if (lcd_log[base + 7 + b] !== {1'b1, dw[W-1-b] ? 8'h31 : 8'h30}) failures++;
        if (lcd_log[base + 14 + W + b] !== {1'b1, ew[W-1-b] ? 8'h31 : 8'h30}) failures++;
      end
    end
    $display("flits %0d idle %0d resets %0d lcd refreshes %0d", n_flits, n_idle, n_reset, n_frames);
    $display("inversions none %0d odd %0d even %0d full %0d", n_inv[0], n_inv[1], n_inv[2], n_inv[3]);
    for (int k = 0; k < 4; k++) begin checks++; if (n_inv[k] == 0) failures++; end
    checks += 3;
    if (n_idle == 0) failures++;
    if (n_reset == 0) failures++;
    if (n_frames == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
