// Testbench for t4_block: pair flag set exactly for the Type-IV pairs that
// become Type II when the present word is fully inverted (reference applies
// the inversion and re-classifies).
module tb_t4_block;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic [W-1:0] cur, prev, sw;
  logic [W-2:0] peq, t4;
  int checks = 0, failures = 0, seen = 0;

  assign sw  = cur ^ prev;
  assign peq = ~(prev[W-1:1] ^ prev[W-2:0]);
  t4_block #(.W(W)) dut (.sw(sw), .peq(peq), .t4(t4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      word_t ci;
      cur = W'($urandom); prev = W'($urandom); #1;
      ci = ref_inv(word_t'(cur), 1'b1, 1'b1, W);
      for (int j = 0; j < W - 1; j++) begin
        automatic bit want = ref_type(word_t'(prev), word_t'(cur), j) == 4 &&
                   ref_type(word_t'(prev), ci, j) == 2;
        checks++;
        if (t4[j] !== want) failures++;
        seen += int'(t4[j]);
      end
    end
    checks++; if (seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
