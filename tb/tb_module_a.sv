// Testbench for module_a (Scheme II): like the Module C test but with the
// choice limited to none, odd and full inversion; all three must occur and
// even-only inversion never.
module tb_module_a;
  import coding_ref_pkg::*;
  localparam int W = 9, P = W - 1, CW = 4;
  logic [CW-1:0] n1, n2, n4, no;
  logic odd_inv, even_inv;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  module_a #(.P(P)) dut (.*);

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
      n1 = CW'(ref_count(prev, cur, W, 1));
      n2 = CW'(ref_count(prev, cur, W, 2));
      n4 = CW'(ref_count_change(prev, cur, W, 1'b1, 1'b1, 4, 2));
      no = CW'(ref_count_change(prev, cur, W, 1'b1, 1'b0, 1, 2));
      #1;
      want = ref_choice(prev, cur, W, 2);
      checks++;
      if ({even_inv, odd_inv} !== want) failures++;
      seen[{even_inv, odd_inv}]++;
    end
    checks += 4;
    if (seen[0] == 0) failures++;
    if (seen[1] == 0) failures++;
    if (seen[2] != 0) failures++;
    if (seen[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
