// Testbench of the SCDT calibration engine at a reduced size (16 addresses,
// 1000 samples). Samples are drawn from an uneven distribution; the table
// entries written must equal (count below + half own count) / samples * 2^14,
// computed here from the testbench's own histogram, within one unit. Checks
// the clear, collect and build phases and their cycle counts.
`timescale 1ps/1fs
module tb_scdt_calib;
  localparam int AW = 4, N = 1000, D = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, collecting, sample_valid = 0, lut_we;
  logic [AW-1:0] sample_addr = 0, lut_waddr;
  logic [13:0]   lut_wdata;
  int checks = 0, failures = 0;
  int hist[D];
  int lut[D];
  int nwrites = 0;

  scdt_calib #(.ADDR_W(AW), .CAL_SAMPLES(N)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (lut_we) begin
    lut[lut_waddr] <= int'(lut_wdata);
    nwrites++;
  end

  initial begin
    for (int round = 0; round < 3; round++) begin
      int cyc, cum;
      foreach (hist[a]) hist[a] = 0;
      nwrites = 0;
      #12000 rst_n = 1;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      check(busy && !collecting, "clearing after start");
      cyc = 0;
      while (!collecting) begin @(negedge clk); cyc++; end
      check(cyc == D, $sformatf("clear pass %0d cycles", cyc));
      for (int s = 0; s < N; s++) begin
        int a;
        // uneven: addresses weighted by (a % 5 + 1), one address never hit
        do a = $urandom_range(0, D - 1); while (a == 6 || $urandom_range(0, 4) > a % 5);
        sample_addr = AW'(a);
        sample_valid = 1;
        hist[a]++;
        @(negedge clk) sample_valid = 0;
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end
      cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      check(cyc <= D + 4, $sformatf("build pass %0d cycles", cyc));
      check(nwrites == D, $sformatf("%0d table writes", nwrites));
      cum = 0;
      for (int a = 0; a < D; a++) begin
        real expv;
        expv = (real'(cum) + real'(hist[a]) / 2.0) / real'(N) * 16384.0;
        check(real'(lut[a]) > expv - 1.01 && real'(lut[a]) < expv + 1.01,
              $sformatf("round %0d entry %0d: %0d expected %.2f", round, a, lut[a], expv));
        cum += hist[a];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
