// Testbench of the conversion controller. A stand-in for the FIS raises
// phase at a random time and drops it as soon as clear is seen. Expected:
// one capture per phase pulse, 2 or 3 system cycles after phase rises
// (synchroniser), clear high for CLEAR_CYCLES cycles from the capture cycle,
// the stale synchroniser contents never cause a second capture, and a new
// phase that rises right after clear is released is captured.
`timescale 1ps/1fs
module tb_conv_ctrl;
  logic clk = 0, rst_n = 0, phase = 0, capture, clear;
  int checks = 0, failures = 0, captures = 0;

  conv_ctrl dut (.*);

  always #5000 clk = ~clk;
  always @(posedge clk) if (capture) captures++;
  always @(posedge clear) phase = 0;   // the FIS is cleared asynchronously

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #12000 rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      int c0, lat, clr_len;
      realtime tr;
      @(negedge clk);
      #($urandom_range(0, 9999));
      c0 = captures;
      phase = 1;
      tr = $realtime;
      lat = 0;
      while (!capture) begin @(negedge clk); lat++; end
      check(lat >= 2 && lat <= 3, $sformatf("capture %0d cycles after phase", lat));
      @(negedge clk);
      clr_len = 0;
      while (clear) begin @(negedge clk); clr_len++; end
      check(clr_len == 1, $sformatf("clear %0d cycles", clr_len));
      if (i % 2) begin
        // new event right after release
        #(100) phase = 1;
        repeat (8) @(negedge clk);
        check(captures == c0 + 2, "event after release captured");
        while (clear) @(negedge clk);
      end
      repeat (6) @(negedge clk);
      check(captures == c0 + (i % 2 ? 2 : 1), "no stale capture");
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
