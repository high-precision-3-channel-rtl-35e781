// Testbench of the delay-line model: idle pattern; after an event, the
// captured pattern is a pulse of ones (tail, head) whose every sub-line of
// taps 4 apart is free of bubbles; the number of taps passed by the 0 front
// grows with the interval; the leading edge covers about 128 taps over the
// ~2 ns range (16 ps average delay).
`timescale 1ps/1fs
module tb_sis_tdl_model;
  localparam int L = 148, W = 20, K = 4;
  logic event_i = 0, phase_clk = 0;
  logic [L-1:0] q;
  int checks = 0, failures = 0;

  sis_tdl_model #(.SEED(7), .OFFSET_PS(0.0)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Zeros below the pulse (tail), counted over all taps.
  function automatic int ones(logic [L-1:0] v);
    int n;
    n = 0;
    for (int i = 0; i < L; i++) n += v[i];
    return n;
  endfunction

  initial begin
    int prev_tail;
    phase_clk = 1; #10 phase_clk = 0; #10;
    check(q == {{(L-W+1){1'b0}}, {(W-1){1'b1}}}, "idle pattern: launcher taps high");
    prev_tail = -1;
    for (int dt = 20; dt <= 2100; dt += 20) begin
      int tail, first, last, head_ok;
      event_i = 1;
      #(dt);
      phase_clk = 1;
      #1;
      // every sub-line must be 0..0 1..1 0..0
      for (int j = 0; j < K; j++) begin
        int st;  // 0: leading zeros, 1: ones, 2: trailing zeros
        bit ok;
        st = 0;
        ok = 1;
        for (int b = j; b < L; b += K) begin
          if (st == 0 && q[b]) st = 1;
          else if (st == 1 && !q[b]) st = 2;
          else if (st == 2 && q[b]) ok = 0;
        end
        check(ok, $sformatf("sub-line %0d bubble-free at dt=%0d", j, dt));
      end
      tail = 0;
      for (int j = 0; j < K; j++)
        for (int b = j; b < L && !q[b]; b += K) tail++;
      check(tail >= prev_tail, $sformatf("tail moves forward with dt (%0d -> %0d)", prev_tail, tail));
      prev_tail = tail;
      if (dt <= 1900) check(ones(q) >= 12 && ones(q) <= 28, $sformatf("pulse width %0d taps at dt=%0d", ones(q), dt));
      if (dt == 2100) check(tail >= 120 && tail <= 140, $sformatf("about 128 taps in 2.1 ns: %0d", tail));
      #10 phase_clk = 0; event_i = 0;
      #100;
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
