// Testbench for t2_block: pair flag set exactly for Type-II transitions
// (both lines switch in opposite directions) of random word pairs.
module tb_t2_block;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic [W-1:0] cur, prev, sw;
  logic [W-2:0] peq, t2;
  int checks = 0, failures = 0, seen = 0;

  assign sw  = cur ^ prev;
  assign peq = ~(prev[W-1:1] ^ prev[W-2:0]);
  t2_block #(.W(W)) dut (.sw(sw), .peq(peq), .t2(t2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      cur = W'($urandom); prev = W'($urandom); #1;
      for (int j = 0; j < W - 1; j++) begin
        checks++;
        if (t2[j] !== (ref_type(word_t'(prev), word_t'(cur), j) == 2)) failures++;
        seen += int'(t2[j]);
      end
    end
    checks++; if (seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
