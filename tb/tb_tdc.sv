// Testbench of the two-stage TDC. Events are swept over two clock periods in
// 7 ps steps. For each event the phase edge must come one period after the
// first clock edge following the event, t_fis must name that edge's polarity,
// and the number of taps passed by the 0 front, summed over the four lines,
// must grow as the event moves earlier within the same half period (a longer
// interval to the phase edge) and cover most of the line.
`timescale 1ps/1fs
module tb_tdc;
  localparam int T = 3334;
  logic clk = 0, clr = 1, event_i = 0, phase, t_fis;
  logic [591:0] sis_data;
  int checks = 0, failures = 0;
  realtime t_rise;

  tdc dut (.*);

  always #(T/2) clk = ~clk;
  always @(posedge phase) t_rise = $realtime;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int tail_sum(logic [591:0] d);
    int n;
    n = 0;
    for (int t = 0; t < 4; t++)
      for (int j = 0; j < 4; j++)
        for (int b = j; b < 148 && !d[t*148 + b]; b += 4) n++;
    return n;
  endfunction

  initial begin
    int prev_tail, prev_half, minx, maxx;
    #(10*T) clr = 0;
    prev_tail = -1; prev_half = -1; minx = 99999; maxx = 0;
    for (int s = 0; s < 2 * T; s += 7) begin
      realtime te, rel, tedge;
      int half, tail;
      @(posedge clk);
      #(T / 2);         // now on a falling edge
      #(5 * T);
      // never exactly on a clock edge
      #((s % T + 3) % (T / 2) == 0 ? s % T + 4 : s % T + 3);
      te  = $realtime;
      rel = te - T / 2 - $floor((te - T / 2) / T) * T;
      half = (rel > T / 2) ? 0 : 1;     // 0: next edge is rising
      tedge = half == 0 ? te - rel + T : te - rel + T / 2;
      event_i = 1;
      #(2 * T);
      check(t_rise == tedge + T, "phase edge one period after the first edge");
      check(t_fis == (half == 0), "t_fis");
      tail = tail_sum(sis_data);
      if (half == prev_half) check(tail <= prev_tail + 2, $sformatf("code falls as the event moves later (%0d -> %0d)", prev_tail, tail));
      if (tail < minx) minx = tail;
      if (tail > maxx) maxx = tail;
      prev_half = half; prev_tail = tail;
      clr = 1; event_i = 0; #(500); clr = 0;
      #(3 * T);
    end
    check(maxx - minx > 300, $sformatf("half period spans %0d tap positions", maxx - minx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(3334 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
