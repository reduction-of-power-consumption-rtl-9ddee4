// Testbench for prev_data: random load/data sequence against a reference
// register; checks reset value and that the word holds when load is low.
module tb_prev_data;
  localparam int W = 9;
  logic clk = 0, rst, load, odd_in, even_in, odd_q, even_q;
  logic [W-1:0] d, q;
  logic [W+1:0] model;
  int checks = 0, failures = 0;

  prev_data #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; d = '1; odd_in = 1; even_in = 1;
    @(posedge clk); #1;
    checks++; if ({q, odd_q, even_q} !== '0) failures++;
    rst = 0; model = '0;
    for (int n = 0; n < 1000; n++) begin
      load = 1'($urandom); d = W'($urandom); odd_in = 1'($urandom); even_in = 1'($urandom);
      @(posedge clk);
      if (load) model = {d, odd_in, even_in};
      #1;
      checks++;
      if ({q, odd_q, even_q} !== model) begin
        failures++; $display("cycle %0d: got %b want %b", n, {q, odd_q, even_q}, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
