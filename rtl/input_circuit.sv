// Input circuit of one measurement channel.
//
// A D flip-flop whose data input is tied high is clocked by the measured
// signal, so the first rising edge sets the event output and holds it there
// until the conversion controller ends the conversion with `clear`. Further
// edges arriving meanwhile change nothing: they fall into the channel's dead
// time. In front of the flip-flop a selector takes either the measurement
// input or the on-board calibrator's square wave, the latter during the
// statistical code density test. The described device feeds the calibrator
// to the channels in place of the measured signals; doing that with a
// selector inside the FPGA is this design's choice.
//
// Timing: event_o rises with the selected input (no clock involved) and falls
// asynchronously with clear or with the reset (rst_n low).
`timescale 1ps/1fs
module input_circuit (
  input  logic rst_n,    // asynchronous reset, active low
  input  logic meas_in,  // measured signal
  input  logic cal_in,   // calibrator square wave
  input  logic cal_sel,  // 1: calibrator feeds the channel (change only while idle)
  input  logic clear,    // end of conversion, asynchronous, active high
  output logic event_o   // held high from the first selected rising edge until clear
);

  logic sel_in;
  logic arm_clr;

  assign sel_in  = cal_sel ? cal_in : meas_in;
  assign arm_clr = clear | ~rst_n;

  always_ff @(posedge sel_in or posedge arm_clr) begin
    if (arm_clr) event_o <= 1'b0;
    else         event_o <= 1'b1;
  end

endmodule
