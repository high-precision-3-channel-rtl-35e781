// Full-size end-to-end testbench of the three-channel time interval counter:
// every parameter of the counter at its default, i.e. 2 million calibration
// samples and 512-word FIFOs. Same sequence as the reduced testbench:
//   1. start-up calibration from a random square wave on cal_in,
//   2. burst-mode intervals (two pulses on one channel) and start-stop
//      intervals (start on one channel, stop on another), random lengths,
//      checked against the known pulse times,
//   3. a manual calibration request, followed by more intervals,
//   4. dead time: a pulse inside the dead time is ignored, one 60 ns after
//      the previous is recorded,
//   5. FIFO overflow with reading suspended.
// Every mechanism is counted and must occur at least once: start-up and
// requested calibration, both FIS phases, burst and start-stop mode, a lost
// pulse in the dead time, back-to-back pulses at 60 ns, FIFO overflow.
// Timestamp unit: T_CLK/2^14 with T_CLK = 3334 ps.
`timescale 1ps/1fs
module tb_tic_top_full;
  localparam int unsigned NCH    = 3;
  localparam int unsigned CAL_N  = 2_000_000;
  localparam int unsigned FDEPTH = 512;
  localparam real         TCLK   = 3334.0;
  localparam real         TOL_PS = 20.0;

  logic clk_main = 0, clk_sys = 0, rst_n = 1;
  logic [NCH-1:0] meas_in = '0, rd_en = '0, rd_valid, empty, overflow;
  logic cal_in = 0, cal_req = 0, cal_busy;
  logic [NCH-1:0][53:0] rd_data;
  bit   read_enable = 1;
  bit   cal_run = 1;

  int checks = 0, failures = 0;
  int n_boot_cal = 0, n_req_cal = 0, n_ph0 = 0, n_ph180 = 0, n_burst = 0, n_ss = 0;
  int n_deadlost = 0, n_fast = 0, n_ovf = 0;
  longint unsigned tsq[NCH][$];
  real err_sum = 0.0, err_sq = 0.0;
  int  n_err = 0;

  tic_top dut (
    .clk_main, .clk_sys, .rst_n, .meas_in, .cal_in, .cal_req, .cal_busy,
    .rd_en, .rd_data, .rd_valid, .empty, .overflow
  );

  always #(1667) clk_main = ~clk_main;
  initial begin #(2300); forever #(5000) clk_sys = ~clk_sys; end

  // Calibrator: square wave with random half periods, unrelated to the clock.
  initial begin
    #(1000);
    forever begin
      #(30000 + $urandom_range(0, 40000));
      cal_in = cal_run ? ~cal_in : 1'b0;
    end
  end

  // Host side: read every channel whenever it has data.
  always_ff @(posedge clk_sys) begin
    for (int c = 0; c < NCH; c++) begin
      rd_en[c] <= read_enable && !empty[c] && !rd_en[c];
      if (rd_valid[c]) tsq[c].push_back(rd_data[c]);
    end
  end

  // Count the FIS phases seen on channel 0 in normal operation.
  always @(posedge clk_sys)
    if (dut.g_ch[0].u_ch.capture && !cal_busy) begin
      if (dut.g_ch[0].u_ch.t_fis) n_ph0++; else n_ph180++;
    end

  task automatic pulse(int c);
    meas_in[c] = 1'b1;
    #(8000);
    meas_in[c] = 1'b0;
  endtask

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic drain();
    repeat (40) @(posedge clk_sys);
  endtask

  // One interval of dt ps between channel a (start) and channel b (stop).
  task automatic interval(int a, int b, real dt);
    longint unsigned t1, t2;
    real meas, err;
    int  q1, q2;
    q1 = tsq[a].size(); q2 = tsq[b].size();
    #($urandom_range(0, 9999));
    if (a == b) begin
      fork pulse(a); join_none
      #(dt);
      pulse(b);
    end else begin
      fork pulse(a); join_none
      #(dt);
      pulse(b);
    end
    drain();
    if (a == b) begin
      check(tsq[a].size() == q1 + 2, $sformatf("burst ch%0d: %0d timestamps", a, tsq[a].size() - q1));
      if (tsq[a].size() != q1 + 2) return;
      t1 = tsq[a][q1]; t2 = tsq[a][q1+1];
      n_burst++;
    end else begin
      check(tsq[a].size() == q1 + 1 && tsq[b].size() == q2 + 1, "start-stop timestamp count");
      if (tsq[a].size() != q1 + 1 || tsq[b].size() != q2 + 1) return;
      t1 = tsq[a][q1]; t2 = tsq[b][q2];
      n_ss++;
    end
    meas = real'(longint'(t2 - t1)) * TCLK / 16384.0;
    err  = meas - dt;
    err_sum += err; err_sq += err * err; n_err++;
    check(err < TOL_PS && err > -TOL_PS,
          $sformatf("interval ch%0d->ch%0d %.1f ps measured %.1f ps", a, b, dt, meas));
  endtask

  initial begin
    #(1) rst_n = 0;   // a falling edge, so that asynchronous resets act
    #(25000);
    rst_n = 1;
    // 1. start-up calibration
    wait (cal_busy);
    n_boot_cal++;
    wait (!cal_busy);
    cal_run = 0;
    check(1'b1, "start-up calibration finished");
    drain();
    for (int c = 0; c < NCH; c++) tsq[c].delete();
    // 2. burst and start-stop intervals
    for (int i = 0; i < 12; i++) interval(i % 3, i % 3, 1000.0 + real'($urandom_range(0, 4000000)));
    for (int i = 0; i < 12; i++) interval(i % 3, (i + 1) % 3, 1000.0 + real'($urandom_range(0, 2000000)));
    // 3. requested calibration
    cal_run = 1;
    @(posedge clk_sys) cal_req <= 1'b1;
    @(posedge clk_sys) cal_req <= 1'b0;
    @(posedge clk_sys);
    check(cal_busy, "calibration started on request");
    if (cal_busy) n_req_cal++;
    wait (!cal_busy);
    cal_run = 0;
    drain();
    for (int i = 0; i < 6; i++) interval(i % 3, (i + 2) % 3, 1000.0 + real'($urandom_range(0, 100000)));
    for (int i = 0; i < 6; i++) interval(0, 0, 200000.0 + real'($urandom_range(0, 100000)));
    // 4. dead time
    begin
      int q;
      q = tsq[1].size();
      fork pulse(1); join_none
      #(15000);
      pulse(1);                 // inside the dead time: lost
      drain();
      check(tsq[1].size() == q + 1, "pulse inside dead time ignored");
      if (tsq[1].size() == q + 1) n_deadlost++;
      q = tsq[1].size();
      for (int i = 0; i < 5; i++) begin
        fork pulse(1); join_none
        #(60000);
      end
      drain();
      check(tsq[1].size() == q + 5, $sformatf("5 pulses 60 ns apart: %0d timestamps", tsq[1].size() - q));
      if (tsq[1].size() == q + 5) begin
        n_fast++;
        for (int i = 1; i < 5; i++) begin
          real d;
          d = real'(longint'(tsq[1][q+i] - tsq[1][q+i-1])) * TCLK / 16384.0;
          check(d > 60000.0 - TOL_PS && d < 60000.0 + TOL_PS, $sformatf("60 ns spacing measured %.1f ps", d));
        end
      end
    end
    // 5. overflow
    read_enable = 0;
    drain();
    for (int i = 0; i < FDEPTH + 4; i++) begin pulse(2); #(100000); end
    drain();
    check(overflow[2], "FIFO overflow flagged");
    if (overflow[2]) n_ovf++;
    check(!overflow[0] && !overflow[1], "no overflow on other channels");
    read_enable = 1;
    drain(); drain();
    check(tsq[2].size() > 0, "overflowed FIFO still readable");

    $display("precision: %0d intervals, mean error %.2f ps, rms error %.2f ps",
             n_err, err_sum / n_err, $sqrt(err_sq / n_err));
    $display("mechanisms: bootcal=%0d reqcal=%0d ph0=%0d ph180=%0d burst=%0d startstop=%0d deadlost=%0d fast=%0d overflow=%0d",
             n_boot_cal, n_req_cal, n_ph0, n_ph180, n_burst, n_ss, n_deadlost, n_fast, n_ovf);
    check(n_boot_cal > 0, "start-up calibration happened");
    check(n_req_cal > 0,  "requested calibration happened");
    check(n_ph0 > 0,      "0 degree phase happened");
    check(n_ph180 > 0,    "180 degree phase happened");
    check(n_burst > 0,    "burst mode happened");
    check(n_ss > 0,       "start-stop mode happened");
    check(n_deadlost > 0, "dead-time loss happened");
    check(n_fast > 0,     "60 ns repetition happened");
    check(n_ovf > 0,      "overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2_000_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
