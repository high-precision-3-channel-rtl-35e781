// Testbench of the SIS encoder. First the worked example of a 32-tap line
// split into 4 sub-lines: data 0000 1010 1111 1110 0010 0000 0000 0000 (tap 1
// first) gives partial results 1,2,1,2 (sum 6) from the LSB side and
// 8-4, 8-4, 8-3, 8-5 (sum 16) from the MSB side. Then random bubble-free
// pulses in four full-size 148-tap lines, compared with positions found by a
// plain scan, and the two-cycle latency.
`timescale 1ps/1fs
module tb_sis_encoder;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // Example size.
  logic        v_s = 0, ov_s;
  logic [31:0] raw_s;
  logic [6:0]  r_s, f_s, c_s;
  sis_encoder #(.NUM_TDL(1), .TDL_LEN(32), .SUB_K(4), .CODE_W(7)) dut_s (
    .clk, .rst_n, .in_valid(v_s), .raw(raw_s), .out_valid(ov_s),
    .result_r(r_s), .result_f(f_s), .code(c_s)
  );

  // Full size.
  logic         v = 0, ov;
  logic [591:0] raw;
  logic [10:0]  r, f, c;
  sis_encoder dut (.clk, .rst_n, .in_valid(v), .raw, .out_valid(ov), .result_r(r), .result_f(f), .code(c));

  always #5000 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    string s;
    #12000 rst_n = 1;
    s = "00001010111111100010000000000000";
    for (int i = 0; i < 32; i++) raw_s[i] = (s[i] == "1");
    @(negedge clk) v_s = 1;
    @(negedge clk) v_s = 0;
    check(!ov_s, "not ready after one cycle");
    @(negedge clk);
    check(ov_s, "ready after two cycles");
    check(r_s == 6,  $sformatf("example Result_R %0d", r_s));
    check(f_s == 16, $sformatf("example Result_F %0d", f_s));
    check(c_s == 22, $sformatf("example code %0d", c_s));

    for (int n = 0; n < 300; n++) begin
      int er, ef;
      er = 0; ef = 0;
      for (int t = 0; t < 4; t++) begin
        for (int j = 0; j < 4; j++) begin
          int a, b;  // sub-line pulse covers positions a..b-1 (may be empty)
          a = $urandom_range(0, 37);
          b = $urandom_range(a, 37);
          if (n == 0) begin a = 37; b = 37; end          // empty line
          for (int p = 0; p < 37; p++) raw[t*148 + p*4 + j] = (p >= a && p < b);
          if (b == a) begin er += 37; ef += 0; end
          else begin er += a; ef += b; end
        end
      end
      @(negedge clk) v = 1;
      @(negedge clk) v = 0;
      @(negedge clk);
      check(ov && r == 11'(er) && f == 11'(ef) && c == 11'(er + ef),
            $sformatf("random %0d: r=%0d/%0d f=%0d/%0d", n, r, er, f, ef));
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
