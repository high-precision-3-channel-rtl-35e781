// Testbench of the first interpolation stage. Events are placed at random
// times; the expected answer follows from the event time alone: the
// synchroniser whose clock edge comes first after the event wins, and phase
// rises one clock period after that edge. Also checks that phase rises
// exactly once per event and that clearing returns it to idle without a
// spurious edge.
`timescale 1ps/1fs
module tb_fis;
  localparam int T = 3334;
  logic clk = 0, clr = 1, event_i = 0, phase, t_fis;
  int checks = 0, failures = 0, rises = 0, n0 = 0, n180 = 0;
  realtime t_rise;

  fis dut (.*);

  always #(T/2) clk = ~clk;
  always @(posedge phase) begin rises++; t_rise = $realtime; end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #(10*T) clr = 0;
    #(3*T);
    check(!phase && t_fis, "idle: phase low, t_fis high");
    for (int i = 0; i < 300; i++) begin
      realtime te, tedge, rel;
      bit      pos_first;
      int      r0;
      @(posedge clk);
      #($urandom_range(1, T - 1));
      te  = $realtime;
      rel = te - T / 2 - $floor((te - T / 2) / T) * T;  // since last rising edge (edges at T/2 + kT)
      pos_first = rel > T / 2;                     // next edge is a rising one
      tedge = pos_first ? te - rel + T : te - rel + T / 2;
      r0 = rises;
      event_i = 1;
      #(3 * T);
      check(rises == r0 + 1, "one phase edge per event");
      check(t_rise == tedge + T, $sformatf("phase edge at %0t, expected %0t", t_rise, tedge + T));
      check(t_fis == pos_first, "t_fis names the winning synchroniser");
      if (pos_first) n0++; else n180++;
      #($urandom_range(0, 2 * T));
      if (i % 2) begin
        clr = 1; #(1000); event_i = 0; #(2000); clr = 0;  // controller-style clear
      end else begin
        event_i = 0;                                       // event drops by itself
      end
      #(4 * T);
      check(!phase && t_fis, "back to idle");
      check(rises == r0 + 1, "no spurious phase edge when returning to idle");
    end
    check(n0 > 0 && n180 > 0, "both phases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(3334 * 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
