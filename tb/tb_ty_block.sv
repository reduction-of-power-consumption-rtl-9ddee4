// Testbench for ty_block: random previous/present words; each pair flag must
// be set exactly when the reference classifies the pair as Type I.
module tb_ty_block;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic [W-1:0] cur, prev, sw;
  logic [W-2:0] ty;
  int checks = 0, failures = 0, seen = 0;

  assign sw = cur ^ prev;
  ty_block #(.W(W)) dut (.sw(sw), .ty(ty));

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
        if (ty[j] !== (ref_type(word_t'(prev), word_t'(cur), j) == 1)) failures++;
        seen += int'(ty[j]);
      end
    end
    checks++; if (seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
