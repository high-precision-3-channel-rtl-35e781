// One measurement channel of the time interval counter.
//
// Input circuit, two-stage TDC, period register, conversion controller, code
// processor and timestamp FIFO, connected as in the block diagram of a single
// channel: the input flip-flop holds the event, the FIS phase edge captures
// the SIS and latches the shared period count, and the code processor turns
// the three results into a timestamp that is written to the FIFO. While the
// code processor calibrates, the input circuit takes the calibrator signal.
//
// When a calibration ends, the input switches back to the measured signal
// and captures are discarded for GUARD_CYCLES (6) system cycles, so that an
// event latched from the calibrator is not mistaken for a measurement; this
// is this design's choice.
//
// Timing: the main clock domain (TDC, period register) runs at 300 MHz, the
// rest at the 100 MHz system clock. A timestamp reaches the FIFO about 8
// system cycles after the event; the dead time is 33 to 45 ns.
`timescale 1ps/1fs
module tic_channel #(
  parameter int unsigned NUM_TDL      = tic_pkg::NUM_TDL,
  parameter int unsigned TDL_LEN      = tic_pkg::TDL_LEN,
  parameter int unsigned WU_LEN       = tic_pkg::WU_LEN,
  parameter int unsigned SUB_K        = tic_pkg::SUB_K,
  parameter int unsigned PERIOD_CNT_W = tic_pkg::PERIOD_CNT_W,
  parameter int unsigned FRAC_W       = tic_pkg::FRAC_W,
  parameter int unsigned CAL_SAMPLES  = tic_pkg::CAL_SAMPLES,
  parameter int unsigned FIFO_DEPTH   = tic_pkg::FIFO_DEPTH,
  parameter int unsigned SEED_BASE    = 1
) (
  input  logic                           clk_main,   // 300 MHz main clock
  input  logic                           clk_sys,    // 100 MHz system clock
  input  logic                           rst_n,      // asynchronous reset, active low
  input  logic                           meas_in,    // measured signal
  input  logic                           cal_in,     // calibrator square wave
  input  logic [PERIOD_CNT_W-1:0]        count,      // shared period counter
  input  logic                           cal_start,  // start a calibration (pulse, clk_sys)
  output logic                           cal_busy,
  input  logic                           rd_en,      // FIFO read (clk_sys)
  output logic [PERIOD_CNT_W+FRAC_W-1:0] rd_data,
  output logic                           rd_valid,
  output logic                           empty,
  output logic                           overflow
);

  localparam int unsigned TS_W         = PERIOD_CNT_W + FRAC_W;
  localparam int unsigned GUARD_CYCLES = 6;

  logic                       event_w, phase, t_fis, clear, capture, clr_fis;
  logic [NUM_TDL*TDL_LEN-1:0] sis_data;
  logic [PERIOD_CNT_W-1:0]    n_reg;
  logic                       ts_valid;
  logic [TS_W-1:0]            ts;
  logic                       full;
  logic [15:0]                dropped;
  logic [GUARD_CYCLES-1:0]    guard_sr;   // cycles since the end of a calibration
  logic                       guard;
  logic                       cp_valid;

  input_circuit u_in (
    .rst_n, .meas_in, .cal_in, .cal_sel(cal_busy), .clear, .event_o(event_w)
  );

  assign clr_fis = clear | ~rst_n;

  tdc #(.NUM_TDL(NUM_TDL), .TDL_LEN(TDL_LEN), .WU_LEN(WU_LEN), .SEED_BASE(SEED_BASE)) u_tdc (
    .clk(clk_main), .clr(clr_fis), .event_i(event_w), .phase, .t_fis, .sis_data
  );

  period_register #(.WIDTH(PERIOD_CNT_W)) u_preg (
    .clk(clk_main), .rst_n, .phase, .count_i(count), .n_o(n_reg)
  );

  conv_ctrl u_ctrl (.clk(clk_sys), .rst_n, .phase, .capture, .clear);

  // An event latched from the calibrator just before the input switches back
  // is still converted; events captured in the first cycles after a
  // calibration are therefore discarded.
  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) guard_sr <= '0;
    else        guard_sr <= {guard_sr[GUARD_CYCLES-2:0], cal_busy};
  end
  assign guard    = |guard_sr & ~cal_busy;
  assign cp_valid = capture & ~guard;

  code_processor #(
    .NUM_TDL(NUM_TDL), .TDL_LEN(TDL_LEN), .SUB_K(SUB_K), .PERIOD_CNT_W(PERIOD_CNT_W),
    .FRAC_W(FRAC_W), .CAL_SAMPLES(CAL_SAMPLES)
  ) u_cp (
    .clk(clk_sys), .rst_n, .cal_start, .cal_busy,
    .in_valid(cp_valid), .sis_raw(sis_data), .t_fis, .n_raw(n_reg),
    .ts_valid, .ts
  );

  ts_fifo #(.WIDTH(TS_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk_sys), .rst_n, .wr_en(ts_valid), .wr_data(ts),
    .rd_en, .rd_data, .rd_valid, .empty, .full, .overflow, .dropped
  );

endmodule
