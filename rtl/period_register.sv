// Period register of one channel.
//
// Latches the period counter when the first interpolation stage signals an
// event. The described device drives the register's clock enable from the
// FIS `phase` signal and clocks it with the main clock. Here the enable is the
// first main-clock cycle in which `phase` is seen high (a rising-edge detect),
// so the register keeps that one value for the whole conversion; this detail
// is this design's choice.
//
// Timing: with rising main clock edges numbered like the counter (after edge
// k the count is k), an event answered by the 0 degree synchroniser at edge m
// raises `phase` just after edge m+1 and the value m+1 is latched at edge
// m+2; an event answered by the 180 degree synchroniser at the falling edge
// before m raises `phase` between edges m and m+1 and the value m is latched
// at edge m+1. The code processor corrects the first case by one.
`timescale 1ps/1fs
module period_register #(
  parameter int unsigned WIDTH = tic_pkg::PERIOD_CNT_W
) (
  input  logic             clk,      // main clock
  input  logic             rst_n,    // asynchronous reset, active low
  input  logic             phase,    // FIS phase signal
  input  logic [WIDTH-1:0] count_i,  // period counter
  output logic [WIDTH-1:0] n_o       // latched period count N
);

  logic phase_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_d <= 1'b0;
      n_o     <= '0;
    end else begin
      phase_d <= phase;
      if (phase && !phase_d) n_o <= count_i;
    end
  end

endmodule
