// Two-stage time-to-digital converter of one channel.
//
// The first interpolation stage (FIS) finds the half of the main clock period
// in which the event occurred and produces `phase`, whose rising edge lies on
// a main clock edge. That edge captures the NUM_TDL wave-union delay lines of
// the second interpolation stage (SIS), which measure the rest of the interval
// with picosecond resolution. Four lines of 148 taps, each with a 20-stage
// launcher, follow the described device; the delay lines are behavioural
// models with different delays per instance (seeds SEED_BASE+t).
//
// Timing: phase rises 1 to 1.5 main clock periods after the event; sis_data
// and t_fis are valid from then until the next event.
`timescale 1ps/1fs
module tdc #(
  parameter int unsigned NUM_TDL   = tic_pkg::NUM_TDL,
  parameter int unsigned TDL_LEN   = tic_pkg::TDL_LEN,
  parameter int unsigned WU_LEN    = tic_pkg::WU_LEN,
  parameter int unsigned SEED_BASE = 1
) (
  input  logic                       clk,       // main clock
  input  logic                       clr,       // asynchronous clear
  input  logic                       event_i,   // from the input circuit
  output logic                       phase,     // FIS phase signal
  output logic                       t_fis,     // 1: 0 degree, 0: 180 degree
  output logic [NUM_TDL*TDL_LEN-1:0] sis_data   // line t at bits t*TDL_LEN +: TDL_LEN
);

  fis u_fis (.clk, .clr, .event_i, .phase, .t_fis);

  for (genvar t = 0; t < int'(NUM_TDL); t++) begin : g_sis
    sis_tdl_model #(.TDL_LEN(TDL_LEN), .WU_LEN(WU_LEN), .SEED(SEED_BASE + t)) u_line (
      .event_i, .phase_clk(phase), .q(sis_data[t*TDL_LEN +: TDL_LEN])
    );
  end

endmodule
