// Testbench of the code processor at a reduced size: one delay line of 32
// taps in 4 sub-lines and 2000 calibration samples. A sample is a pulse of 8
// ones starting at tap m (m = 0..24) and a FIS phase; the code grows with m.
// After a calibration on random (phase, m), every timestamp must equal
// N_eff * 2^14 - (samples below + half own samples) / 2000 * 2^14, with
// N_eff = N - 1 for the 0 degree phase, within one unit; here the ordering
// is by (180 degree phase, m). No timestamp may appear during calibration;
// latency 5 cycles.
`timescale 1ps/1fs
module tb_code_processor;
  localparam int N = 2000;
  logic clk = 0, rst_n = 0, cal_start = 0, cal_busy, in_valid = 0, t_fis = 0, ts_valid;
  logic [31:0] sis_raw = 0;
  logic [39:0] n_raw = 0;
  logic [53:0] ts;
  int checks = 0, failures = 0, hist[2][25], n_ts = 0;

  code_processor #(.NUM_TDL(1), .TDL_LEN(32), .SUB_K(4), .CAL_SAMPLES(N)) dut (.*);

  always #5000 clk = ~clk;
  always @(posedge clk) if (ts_valid) n_ts++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic drive(int ph180, int m, logic [39:0] n);
    for (int i = 0; i < 32; i++) sis_raw[i] = (i >= m && i < m + 8);
    t_fis = ph180 ? 1'b0 : 1'b1;
    n_raw = n;
    in_valid = 1;
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    #12000 rst_n = 1;
    @(negedge clk) cal_start = 1;
    @(negedge clk) cal_start = 0;
    check(cal_busy, "calibration running");
    repeat (300) @(negedge clk);
    for (int s = 0; s < N; s++) begin
      int p, m;
      p = $urandom_range(0, 1);
      m = $urandom_range(0, 24);
      hist[p][m]++;
      drive(p, m, 40'($urandom));
      repeat ($urandom_range(2, 5)) @(negedge clk);
    end
    while (cal_busy) @(negedge clk);
    check(n_ts == 0, "no timestamps during calibration");
    for (int k = 0; k < 200; k++) begin
      int p, m, cum, lat;
      logic [39:0] n;
      real f, expv, got;
      p = $urandom_range(0, 1);
      m = $urandom_range(0, 24);
      n = 40'($urandom) + 40'd2;
      cum = 0;
      for (int pp = 0; pp < 2; pp++)
        for (int mm = 0; mm < 25; mm++)
          if (pp < p || (pp == p && mm < m)) cum += hist[pp][mm];
      f = (real'(cum) + real'(hist[p][m]) / 2.0) / real'(N) * 16384.0;
      expv = real'((p ? n : n - 40'd1)) * 16384.0 - f;
      drive(p, m, n);
      lat = 1;
      while (!ts_valid && lat < 20) begin @(negedge clk); lat++; end
      check(lat == 5, $sformatf("latency %0d cycles", lat));
      got = real'(ts);
      check(got > expv - 1.01 && got < expv + 1.01,
            $sformatf("p=%0d m=%0d ts=%0d expected %.2f", p, m, ts, expv));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
