// Testbench of the timestamp FIFO (8 words): random writes and reads against
// a queue, empty/full flags, one-cycle read latency, dropped writes when full
// and the sticky overflow flag.
`timescale 1ps/1fs
module tb_ts_fifo;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, rd_valid, empty, full, overflow;
  logic [53:0] wr_data = 0, rd_data;
  logic [15:0] dropped;
  logic [53:0] q[$];
  int checks = 0, failures = 0, lost = 0;

  ts_fifo #(.DEPTH(D)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    bit pend;
    #12000 rst_n = 1;
    pend = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (pend) begin
        check(rd_valid, "read data valid one cycle after read");
        check(rd_data == q.pop_front(), "data order");
      end
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(overflow == (lost > 0) && dropped == 16'(lost), "overflow flag and count");
      wr_en = (cyc < 1500) ? ($urandom_range(0, 9) < 6) : ($urandom_range(0, 9) < 3);
      rd_en = (cyc < 1500) ? ($urandom_range(0, 9) < 4) : ($urandom_range(0, 9) < 7);
      wr_data = {$urandom, $urandom};
      pend = rd_en && q.size() > 0;
      if (wr_en) begin
        if (q.size() < D) q.push_back(wr_data);
        else lost++;
      end
    end
    check(lost > 0, "overflow exercised");
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
