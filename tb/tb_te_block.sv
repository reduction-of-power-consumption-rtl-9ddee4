// Testbench for te_block, both variants: a pair is flagged exactly when it is
// Type I and becomes Type II after the even (EVEN_INV=1) or odd (EVEN_INV=0)
// lines of the present word are inverted.
module tb_te_block;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic [W-1:0] cur, prev, sw;
  logic [W-2:0] peq, te_e, te_o;
  int checks = 0, failures = 0, seen_e = 0, seen_o = 0;

  assign sw  = cur ^ prev;
  assign peq = ~(prev[W-1:1] ^ prev[W-2:0]);
  te_block #(.W(W), .EVEN_INV(1)) dut_e (.sw(sw), .peq(peq), .te(te_e));
  te_block #(.W(W), .EVEN_INV(0)) dut_o (.sw(sw), .peq(peq), .te(te_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      word_t ce, co;
      cur = W'($urandom); prev = W'($urandom); #1;
      ce = ref_inv(word_t'(cur), 1'b0, 1'b1, W);
      co = ref_inv(word_t'(cur), 1'b1, 1'b0, W);
      for (int j = 0; j < W - 1; j++) begin
        automatic bit t1 = ref_type(word_t'(prev), word_t'(cur), j) == 1;
        checks += 2;
        if (te_e[j] !== (t1 && ref_type(word_t'(prev), ce, j) == 2)) failures++;
        if (te_o[j] !== (t1 && ref_type(word_t'(prev), co, j) == 2)) failures++;
        seen_e += int'(te_e[j]);
        seen_o += int'(te_o[j]);
      end
    end
    checks++; if (seen_e == 0 || seen_o == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
