// Scheme comparison: three complete designs (noc_coding_top with SCHEME = 1,
// 2, 3) receive the same flit streams, and the coupling activity on each link
// is measured from the words the designs actually drive. Plain Gray coding
// without inversion is the baseline. Two streams: uniformly random flits and
// an incrementing counter.
// Checked: every flit decodes correctly in every design; for Schemes 2 and 3
// no link word costs more than the uninverted Gray word would have against
// the same previous link word; over the random stream Scheme 3 costs less
// than plain Gray and no more than Scheme 2. Costs: Type I = 1, Type II = 2
// per adjacent pair; self transitions (data and flag lines) are reported too.
module tb_scheme_compare;
  import coding_ref_pkg::*;
  localparam int W = 9, NS = 3;
  logic clk = 0, rst, in_valid;
  logic [W-1:0] in_data;
  logic         lv [NS], lo [NS], le [NS], ov [NS];
  logic [W-1:0] ld [NS], od [NS];
  logic [7:0]   ld1 [NS];
  logic         rs [NS], en [NS], fd [NS];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NS; s++) begin : g_dut
    noc_coding_top #(.SCHEME(s + 1), .PWRON_CYC(10), .SETUP_CYC(1), .EN_CYC(1),
                     .CMD_WAIT_CYC(1), .CLR_WAIT_CYC(1)) dut (
      .clk, .rst, .in_valid, .in_data,
      .link_valid(lv[s]), .link_data(ld[s]), .link_odd(lo[s]), .link_even(le[s]),
      .out_valid(ov[s]), .out_data(od[s]), .ld1(ld1[s]), .rs(rs[s]), .en(en[s]),
      .lcd_frame_done(fd[s]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_stream(input string name, input bit counter, input int n_flits,
                            output longint cost [NS + 1]);
    word_t prev [NS + 1];
    longint self_sw [NS + 1];
    logic [W-1:0] d, d_q;
    rst = 1; in_valid = 0; in_data = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int s = 0; s <= NS; s++) begin cost[s] = 0; self_sw[s] = 0; prev[s] = '0; end
    d_q = '0;
    for (int n = 0; n < n_flits; n++) begin
      word_t g;
      d = counter ? W'(n) : W'($urandom);
      g = ref_gray(word_t'(d), W);
      in_valid = 1; in_data = d;
      @(posedge clk); #1;
      for (int s = 0; s < NS; s++) begin
        word_t cur = {21'b0, lo[s], le[s], ld[s]};
        int c = ref_cost(prev[s], word_t'(ld[s]), W);
        cost[s] += longint'(c);
        self_sw[s] += $countones(cur ^ prev[s]);
        if (s > 0) begin
          checks++;
          if (c > ref_cost(prev[s], g, W)) begin
            failures++; $display("%s scheme %0d flit %0d: cost %0d above uninverted", name, s + 1, n, c);
          end
        end
        prev[s] = cur;
        // decoded output of the previous flit
        if (n > 0) begin
          checks++;
          if (!ov[s] || od[s] !== d_q) failures++;
        end
      end
      cost[NS] += longint'(ref_cost(prev[NS], g, W));
      self_sw[NS] += $countones((g ^ prev[NS]) & 32'h1FF);
      prev[NS] = g;
      d_q = d;
    end
    in_valid = 0;
    $display("%s, %0d flits: coupling cost  Scheme I %0d  Scheme II %0d  Scheme III %0d  plain Gray %0d",
             name, n_flits, cost[0], cost[1], cost[2], cost[3]);
    $display("%s, %0d flits: line toggles   Scheme I %0d  Scheme II %0d  Scheme III %0d  plain Gray %0d",
             name, n_flits, self_sw[0], self_sw[1], self_sw[2], self_sw[3]);
  endtask

  initial begin
    longint cr [NS + 1], cc [NS + 1];
    run_stream("random", 1'b0, 20000, cr);
    checks += 2;
    if (cr[2] >= cr[3]) failures++;
    if (cr[2] > cr[1]) failures++;
    run_stream("counter", 1'b1, 2048, cc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
