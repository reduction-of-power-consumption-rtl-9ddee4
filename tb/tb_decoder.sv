// Testbench for decoder: random binary flits are Gray coded and inverted by
// the reference model; the decoder must return the flit one cycle later, and
// hold its output while in_valid is low.
module tb_decoder;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic clk = 0, rst, in_valid, in_odd, in_even, out_valid;
  logic [W-1:0] in_data, out_data, expect_q;
  int checks = 0, failures = 0;

  decoder #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v_q;
    rst = 1; in_valid = 0; in_data = '0; in_odd = 0; in_even = 0;
    @(posedge clk); #1;
    checks++; if (out_valid !== 0 || out_data !== '0) failures++;
    rst = 0; expect_q = '0; v_q = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] b;
      b = W'($urandom);
      in_valid = 1'($urandom);
      in_odd = 1'($urandom); in_even = 1'($urandom);
      in_data = W'(ref_inv(ref_gray(word_t'(b), W), in_odd, in_even, W));
      @(posedge clk);
      if (in_valid) expect_q = b;
      v_q = in_valid;
      #1;
      checks += 2;
      if (out_valid !== v_q) failures++;
      if (out_data !== expect_q) begin
        failures++; $display("got %b want %b", out_data, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
