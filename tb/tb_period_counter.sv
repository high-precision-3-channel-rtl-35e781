// Testbench of the period counter: counts main clock edges from zero, wraps
// at 2^WIDTH (checked at a reduced width).
`timescale 1ps/1fs
module tb_period_counter;
  logic clk = 0, rst_n = 0;
  logic [39:0] count;
  logic [5:0]  count6;
  int checks = 0, failures = 0;

  period_counter dut (.clk, .rst_n, .count);
  period_counter #(.WIDTH(6)) dut6 (.clk, .rst_n, .count(count6));

  always #1667 clk = ~clk;

  initial begin
    #5000;
    checks++; if (count != 0) failures++;
    @(negedge clk) rst_n = 1;
    for (int k = 1; k <= 200; k++) begin
      @(negedge clk);
      checks++;
      if (count != 40'(k) || count6 != 6'(k % 64)) begin
        failures++;
        $display("FAIL: edge %0d count %0d count6 %0d", k, count, count6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
