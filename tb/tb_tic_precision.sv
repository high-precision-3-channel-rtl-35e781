// Precision workload: the same interval measured many times, at random
// positions relative to the main clock, in burst mode (two pulses on one
// channel) and in start-stop mode (start on one channel, stop on another).
// The spread (standard deviation) of the results must stay below 8 ps and
// the mean within 10 ps of the true interval, for intervals of 1 ns
// (start-stop only), 1 us and 100 us. The counter is calibrated with 262144
// samples (the full 2 million take minutes to simulate); the delay lines are
// the behavioural models with their random 8-24 ps stages.
`timescale 1ps/1fs
module tb_tic_precision;
  localparam int unsigned NCH = 3;
  localparam real         TCLK = 3334.0;
  localparam int          REPS = 60;

  logic clk_main = 0, clk_sys = 0, rst_n = 1;
  logic [NCH-1:0] meas_in = '0, rd_en = '0, rd_valid, empty, overflow;
  logic cal_in = 0, cal_busy;
  logic [NCH-1:0][53:0] rd_data;
  bit   cal_run = 1;
  longint unsigned tsq[NCH][$];
  int checks = 0, failures = 0;

  tic_top #(.CAL_SAMPLES(262144)) dut (
    .clk_main, .clk_sys, .rst_n, .meas_in, .cal_in, .cal_req(1'b0), .cal_busy,
    .rd_en, .rd_data, .rd_valid, .empty, .overflow
  );

  always #(1667) clk_main = ~clk_main;
  initial begin #(2300); forever #(5000) clk_sys = ~clk_sys; end
  initial forever begin
    #(30000 + $urandom_range(0, 40000));
    cal_in = cal_run ? ~cal_in : 1'b0;
  end

  always_ff @(posedge clk_sys)
    for (int c = 0; c < NCH; c++) begin
      rd_en[c] <= !empty[c] && !rd_en[c];
      if (rd_valid[c]) tsq[c].push_back(rd_data[c]);
    end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(int c);
    meas_in[c] = 1'b1;
    #(8000);
    meas_in[c] = 1'b0;
  endtask

  task automatic series(int a, int b, real dt);
    real sum, sq, mean, sd;
    int  n;
    sum = 0.0; sq = 0.0; n = 0;
    for (int r = 0; r < REPS; r++) begin
      for (int c = 0; c < NCH; c++) tsq[c].delete();
      #($urandom_range(0, 9999));
      fork pulse(a); join_none
      #(dt);
      pulse(b);
      repeat (30) @(posedge clk_sys);
      if ((a == b && tsq[a].size() == 2) || (a != b && tsq[a].size() == 1 && tsq[b].size() == 1)) begin
        real m;
        m = real'(longint'((a == b ? tsq[a][1] : tsq[b][0]) - tsq[a][0])) * TCLK / 16384.0;
        sum += m; sq += m * m; n++;
      end
    end
    check(n == REPS, $sformatf("all %0d measurements delivered (%0d)", REPS, n));
    mean = sum / n;
    sd   = $sqrt(sq / n - mean * mean);
    $display("ch%0d->ch%0d interval %.0f ps: mean %.2f ps, std dev %.2f ps", a, b, dt, mean, sd);
    check(sd < 8.0, $sformatf("std dev %.2f ps below 8 ps", sd));
    check(mean > dt - 10.0 && mean < dt + 10.0, $sformatf("mean %.2f ps", mean));
  endtask

  initial begin
    #(1) rst_n = 0;
    #(25000) rst_n = 1;
    wait (cal_busy);
    wait (!cal_busy);
    cal_run = 0;
    repeat (40) @(posedge clk_sys);
    series(0, 1, 1000.0);
    series(1, 2, 1000000.0);
    series(2, 0, 100000000.0);
    series(0, 0, 1000000.0);
    series(2, 2, 100000000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(500_000_000_000.0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
