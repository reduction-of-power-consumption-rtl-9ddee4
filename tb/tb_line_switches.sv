// Testbench for line_switches: random word pairs; a line switches when its
// value differs, a pair is "equal" when both previous values match.
module tb_line_switches;
  localparam int W = 9;
  logic [W-1:0] cur, prev, sw;
  logic [W-2:0] peq;
  int checks = 0, failures = 0;

  line_switches #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      cur = W'($urandom); prev = W'($urandom); #1;
      for (int i = 0; i < W; i++) begin
        checks++; if (sw[i] !== (cur[i] != prev[i])) failures++;
      end
      for (int j = 0; j < W - 1; j++) begin
        checks++; if (peq[j] !== (prev[j+1] == prev[j])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
