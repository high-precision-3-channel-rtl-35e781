// Testbench of the period register: the count present at the first clock
// edge that sees phase high is latched and then held while phase stays high
// and after it falls.
`timescale 1ps/1fs
module tb_period_register;
  logic clk = 0, rst_n = 0, phase = 0;
  logic [39:0] count_i = 0, n_o;
  int checks = 0, failures = 0;

  period_register dut (.*);

  always #1667 clk = ~clk;
  always @(posedge clk) count_i <= count_i + 40'd1;

  initial begin
    #5000 rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      logic [39:0] expect_n;
      repeat ($urandom_range(2, 10)) @(posedge clk);
      #($urandom_range(10, 3000));
      phase = 1;
      @(posedge clk);
      expect_n = count_i;   // value sampled at this edge
      #1;
      checks++;
      if (n_o != expect_n) begin failures++; $display("FAIL: latched %0d expected %0d", n_o, expect_n); end
      repeat ($urandom_range(1, 6)) @(posedge clk);
      phase = 0;
      repeat (3) @(posedge clk);
      #1 checks++;
      if (n_o != expect_n) begin failures++; $display("FAIL: value not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
