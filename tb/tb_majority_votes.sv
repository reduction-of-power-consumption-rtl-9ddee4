// Testbench for majority_votes (Scheme I): counts from the reference
// classifier; full inversion when most lines switch, half (odd) inversion when
// most pairs are Type I transitions that half inversion removes. All three
// outcomes must occur.
module tb_majority_votes;
  import coding_ref_pkg::*;
  localparam int W = 9, CW = 4;
  logic [CW-1:0] n1, no, nsw;
  logic odd_inv, even_inv;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  majority_votes #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      automatic word_t prev = word_t'(W'($urandom));
      automatic word_t cur  = word_t'(W'($urandom));
      logic [1:0] want;
      n1  = CW'(ref_count(prev, cur, W, 1));
      no  = CW'(ref_count_change(prev, cur, W, 1'b1, 1'b0, 1, 2));
      nsw = CW'($countones((prev ^ cur) & 32'h1FF));
      #1;
      want = ref_choice(prev, cur, W, 1);
      checks++;
      if ({even_inv, odd_inv} !== want) failures++;
      seen[{even_inv, odd_inv}]++;
    end
    checks += 3;
    if (seen[0] == 0) failures++;
    if (seen[1] == 0) failures++;
    if (seen[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
