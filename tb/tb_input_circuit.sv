// Testbench of the input circuit: the first rising edge of the selected input
// sets the event, later edges and the other input change nothing, clear and
// reset drop it.
`timescale 1ps/1fs
module tb_input_circuit;
  logic rst_n = 0, meas_in = 0, cal_in = 0, cal_sel = 0, clear = 0, event_o;
  int checks = 0, failures = 0;

  input_circuit dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100 rst_n = 1; #100;
    check(!event_o, "idle after reset");
    for (int i = 0; i < 20; i++) begin
      cal_sel = i[0];
      #50;
      // edge on the unselected input: nothing
      if (cal_sel) begin meas_in = 1; #50 meas_in = 0; end
      else         begin cal_in = 1;  #50 cal_in = 0;  end
      #50 check(!event_o, "unselected input ignored");
      if (cal_sel) cal_in = 1; else meas_in = 1;
      #1 check(event_o, "rising edge sets event");
      #100;
      if (cal_sel) cal_in = 0; else meas_in = 0;
      #100 check(event_o, "event held after input falls");
      if (cal_sel) begin cal_in = 1; #50 cal_in = 0; end
      else         begin meas_in = 1; #50 meas_in = 0; end
      check(event_o, "second edge keeps event");
      if (i == 7) begin rst_n = 0; #1 check(!event_o, "reset clears"); #50 rst_n = 1; end
      else begin clear = 1; #1 check(!event_o, "clear clears"); #50 clear = 0; end
      #50 check(!event_o, "stays clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
