// Testbench for ones: every 8-bit pattern, and random 9-bit patterns, against
// a loop count of set bits.
module tb_ones;
  logic [7:0] f8;
  logic [3:0] c8;
  logic [8:0] f9;
  logic [3:0] c9;
  int checks = 0, failures = 0;

  ones #(.N(8)) dut8 (.flags(f8), .count(c8));
  ones #(.N(9)) dut9 (.flags(f9), .count(c9));

  function automatic int cnt(logic [8:0] v);
    int c = 0;
    for (int i = 0; i < 9; i++) if (v[i]) c++;
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      f8 = 8'(v); f9 = 9'($urandom); #1;
      checks += 2;
      if (int'(c8) != cnt({1'b0, f8})) failures++;
      if (int'(c9) != cnt(f9)) failures++;
    end
    f9 = '1; #1; checks++; if (c9 != 4'd9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
