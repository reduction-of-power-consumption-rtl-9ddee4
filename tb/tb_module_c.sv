// Testbench for module_c: random previous/present words. The counts the
// decision block expects are computed by the reference classifier, and the
// chosen inversion must be the one whose transmitted word really has the
// lowest coupling cost (ties to fewer inverted lines). Every one of the four
// choices must occur.
module tb_module_c;
  import coding_ref_pkg::*;
  localparam int W = 9, P = W - 1, CW = 4;
  logic [CW-1:0] n1, n2, n4, no, ne;
  logic odd_inv, even_inv;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  module_c #(.P(P)) dut (.*);

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
      ne = CW'(ref_count_change(prev, cur, W, 1'b0, 1'b1, 1, 2));
      #1;
      want = ref_choice(prev, cur, W, 3);
      checks++;
      if ({even_inv, odd_inv} !== want) begin
        failures++;
        $display("prev %b cur %b: got %b want %b", prev[W-1:0], cur[W-1:0], {even_inv, odd_inv}, want);
      end
      seen[{even_inv, odd_inv}]++;
    end
    for (int k = 0; k < 4; k++) begin
      checks++; if (seen[k] == 0) begin failures++; $display("choice %0d never made", k); end
    end
    $display("choices none/odd/even/full: %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
