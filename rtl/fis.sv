// First interpolation stage (FIS): which half of the main clock period did
// the event fall into?
//
// Two double synchronisers sample the event, one on the rising and one on the
// falling edge of the main clock. Each one's second flip-flop stores the
// inverted output of its first, so an idle synchroniser outputs 1 and the
// NAND of both outputs, the `phase` signal, is 0. The first synchroniser to
// see the event drops its output one clock period after its first sample;
// that makes `phase` rise on a clock edge of the matching polarity and, through
// the clock enable of the other synchroniser's second flip-flop, freezes the
// other one so it can no longer answer. The rising edge of `phase` clocks the
// second interpolation stage and tells the period register to latch.
// `t_fis` is the output of the falling-edge synchroniser: 1 when the 0 degree
// (rising-edge) synchroniser won, 0 when the 180 degree one won.
//
// The structure (two double synchronisers on opposite clock edges, clock
// enables between them, a NAND producing `phase`) follows the described
// device. That only the second flip-flop of each synchroniser is gated, and
// that the conversion controller clears the stage asynchronously with the
// input flip-flop, are this design's choices: they return the stage to idle
// without a spurious `phase` edge.
//
// Timing: for an event at time te, `phase` rises at the first clock edge
// (rising or falling) after te plus one clock period, so 1 to 1.5 periods
// after te; it stays high until clear.
`timescale 1ps/1fs
module fis (
  input  logic clk,      // main clock (300 MHz)
  input  logic clr,      // asynchronous clear (reset or end of conversion)
  input  logic event_i,  // event from the input circuit
  output logic phase,    // rising edge marks the synchronised event
  output logic t_fis     // 1: 0 degree phase, 0: 180 degree phase
);

  logic a1, a2;  // rising-edge synchroniser
  logic b1, b2;  // falling-edge synchroniser

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      a1 <= 1'b0;
      a2 <= 1'b1;
    end else begin
      a1 <= event_i;
      if (b2) a2 <= ~a1;
    end
  end

  always_ff @(negedge clk or posedge clr) begin
    if (clr) begin
      b1 <= 1'b0;
      b2 <= 1'b1;
    end else begin
      b1 <= event_i;
      if (a2) b2 <= ~b1;
    end
  end

  assign phase = ~(a2 & b2);
  assign t_fis = b2;

endmodule
