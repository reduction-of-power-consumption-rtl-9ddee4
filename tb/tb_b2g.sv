// Testbench for b2g: every 9-bit input, plus the conversion example
// 100101100 -> 101110100, against a bit-by-bit reference.
module tb_b2g;
  import coding_ref_pkg::*;
  localparam int W = 9;
  logic [W-1:0] bin, gray;
  int checks = 0, failures = 0;

  b2g #(.W(W)) dut (.bin(bin), .gray(gray));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bin = 9'b100101100; #1;
    checks++; if (gray !== 9'b101110100) begin failures++; $display("example: %b", gray); end
    for (int v = 0; v < (1 << W); v++) begin
      bin = W'(v); #1;
      checks++;
      if (gray !== W'(ref_gray(word_t'(v), W))) begin
        failures++; $display("b2g(%b) = %b", bin, gray);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
