// Testbench for encoder: the three scheme variants (SCHEME = 3, 2, 1) run side
// by side on the same random flit stream, with idle cycles in between. For each
// the reference model keeps its own copy of the link word, picks the inversion
// by direct cost evaluation and predicts link_data and the flags one cycle
// after each accepted flit. Also checked: reset clears the link, the link holds
// while idle, the decoded word equals the flit, every inversion a scheme may
// choose is chosen, and Scheme III never costs more than plain Gray coding.
module tb_encoder;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic clk = 0, rst, in_valid;
  logic [W-1:0] in_data;
  logic         ov [3];
  logic [W-1:0] ld [3];
  logic         lo [3], le [3];
  int checks = 0, failures = 0;
  int seen [3][4];
  longint cost_enc = 0, cost_gray = 0;

  encoder #(.W(W), .SCHEME(3)) dut3 (.clk, .rst, .in_valid, .in_data,
    .out_valid(ov[2]), .link_data(ld[2]), .link_odd(lo[2]), .link_even(le[2]));
  encoder #(.W(W), .SCHEME(2)) dut2 (.clk, .rst, .in_valid, .in_data,
    .out_valid(ov[1]), .link_data(ld[1]), .link_odd(lo[1]), .link_even(le[1]));
  encoder #(.W(W), .SCHEME(1)) dut1 (.clk, .rst, .in_valid, .in_data,
    .out_valid(ov[0]), .link_data(ld[0]), .link_odd(lo[0]), .link_even(le[0]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prev [3];
    logic [1:0] fl [3];
    word_t gprev;
    foreach (seen[s, k]) seen[s][k] = 0;
    rst = 1; in_valid = 1; in_data = '1;
    @(posedge clk); #1;
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (ld[s] !== '0 || lo[s] || le[s] || ov[s]) failures++;
      prev[s] = '0; fl[s] = '0;
    end
    gprev = '0;
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      word_t g;
      in_valid = ($urandom % 4) != 0;
      in_data  = W'($urandom);
      g = ref_gray(word_t'(in_data), W);
      if (in_valid) begin
        for (int s = 0; s < 3; s++) begin
          fl[s]   = ref_choice(prev[s], g, W, s + 1);
          if (s == 2) begin
            cost_gray += ref_cost(gprev, g, W);
            cost_enc  += ref_cost(prev[s], ref_inv(g, fl[s][0], fl[s][1], W), W);
          end
          prev[s] = ref_inv(g, fl[s][0], fl[s][1], W);
          seen[s][fl[s]]++;
        end
        gprev = g;
      end
      @(posedge clk); #1;
      for (int s = 0; s < 3; s++) begin
        checks += 3;
        if (ov[s] !== in_valid) failures++;
        if (ld[s] !== prev[s][W-1:0] || {le[s], lo[s]} !== fl[s]) begin
          failures++;
          $display("scheme %0d flit %0d: got %b/%b%b want %b/%b", s + 1, n, ld[s], le[s], lo[s],
                   prev[s][W-1:0], fl[s]);
        end
        if (in_valid &&
            ref_bin(ref_inv(word_t'(ld[s]), lo[s], le[s], W), W) != word_t'(in_data)) failures++;
      end
    end
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < 4; k++) begin
        if (k == 2 && s < 2) continue;
        checks++;
        if (seen[s][k] == 0) begin failures++; $display("scheme %0d never chose %0d", s + 1, k); end
      end
    checks++;
    if (cost_enc > cost_gray) failures++;
    $display("Scheme III coupling cost %0d against %0d for plain Gray code", cost_enc, cost_gray);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
