// Testbench of one measurement channel with a reduced calibration (16384
// samples). The testbench provides the period count. After a calibration on
// a random square wave, pairs of pulses at known spacings (burst mode) must
// give timestamp differences within 60 ps of the spacing; every timestamp
// must reach the FIFO within 12 system cycles of its pulse; nothing is
// written to the FIFO during calibration.
`timescale 1ps/1fs
module tb_tic_channel;
  localparam real TCLK = 3334.0;
  logic clk_main = 0, clk_sys = 0, rst_n = 1, meas_in = 0, cal_in = 0, cal_start = 0, cal_busy;
  logic rd_en = 0, rd_valid, empty, overflow;
  logic [39:0] count = 0;
  logic [53:0] rd_data;
  longint unsigned tsq[$];
  int checks = 0, failures = 0;

  tic_channel #(.CAL_SAMPLES(16384), .FIFO_DEPTH(32), .SEED_BASE(40)) dut (.*);

  always #1667 clk_main = ~clk_main;
  initial begin #1200; forever #5000 clk_sys = ~clk_sys; end
  always @(posedge clk_main) count <= count + 1'b1;
  initial forever begin #(30000 + $urandom_range(0, 40000)); cal_in = ~cal_in; end

  always_ff @(posedge clk_sys) begin
    rd_en <= !empty && !rd_en;
    if (rd_valid) tsq.push_back(rd_data);
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1 rst_n = 0;     // a falling edge, so that asynchronous resets act
    #20000 rst_n = 1;
    @(negedge clk_sys) cal_start = 1;
    @(negedge clk_sys) cal_start = 0;
    check(cal_busy, "calibration started");
    while (cal_busy) begin
      @(negedge clk_sys);
      if (!empty) begin check(0, "FIFO written during calibration"); break; end
    end
    repeat (20) @(negedge clk_sys);
    check(empty && tsq.size() == 0, "FIFO empty after calibration");
    for (int i = 0; i < 30; i++) begin
      real dt, meas;
      realtime t1;
      int lat;
      dt = 100000.0 + real'($urandom_range(0, 900000));
      #($urandom_range(0, 9999));
      t1 = $realtime;
      meas_in = 1; #5000 meas_in = 0;
      lat = 0;
      while (empty && lat < 40) begin @(posedge clk_sys); lat++; end
      check(lat <= 12, $sformatf("timestamp after %0d system cycles", lat));
      #(t1 + dt - $realtime);
      meas_in = 1; #5000 meas_in = 0;
      repeat (20) @(posedge clk_sys);
      check(tsq.size() == 2, $sformatf("%0d timestamps", tsq.size()));
      if (tsq.size() == 2) begin
        meas = real'(longint'(tsq[1] - tsq[0])) * TCLK / 16384.0;
        check(meas > dt - 60.0 && meas < dt + 60.0, $sformatf("interval %.1f measured %.1f", dt, meas));
      end
      tsq.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000_000_000.0;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
