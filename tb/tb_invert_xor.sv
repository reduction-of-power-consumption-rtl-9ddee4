// Testbench for invert_xor: random words with all four flag combinations;
// includes the full-inversion example 100101100 -> 011010011.
module tb_invert_xor;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic [W-1:0] din, dout;
  logic odd_inv, even_inv;
  int checks = 0, failures = 0;

  invert_xor #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 9'b100101100; odd_inv = 1; even_inv = 1; #1;
    checks++; if (dout !== 9'b011010011) failures++;
    for (int n = 0; n < 2000; n++) begin
      din = W'($urandom); odd_inv = 1'($urandom); even_inv = 1'($urandom); #1;
      checks++;
      if (dout !== W'(ref_inv(word_t'(din), odd_inv, even_inv, W))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
