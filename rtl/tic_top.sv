// Three-channel time interval counter: top level.
//
// One period counter on the 300 MHz main clock forms the common coarse
// timescale of N_CHANNELS identical channels. Each channel timestamps the
// rising edges of its input with a two-stage interpolator and delivers
// timestamps, in units of T_CLK/2^FRAC_W (about 0.2 ps), through its own FIFO.
// A time interval is the difference of two timestamps, from one channel
// (burst mode) or from two channels (start-stop mode).
//
// All channels calibrate once after reset and again whenever cal_req is
// pulsed; meanwhile they measure the calibrator signal cal_in instead of
// their inputs and deliver no timestamps. The host interface, the frequency
// synthesiser that makes the main clock and the calibrator itself are outside
// this module: the FIFO read ports and the calibrator input are brought out.
//
// Timing: rd_en/rd_data/rd_valid per channel as in ts_fifo, on clk_sys.
`timescale 1ps/1fs
module tic_top #(
  parameter int unsigned N_CHANNELS   = tic_pkg::N_CHANNELS,
  parameter int unsigned NUM_TDL      = tic_pkg::NUM_TDL,
  parameter int unsigned TDL_LEN      = tic_pkg::TDL_LEN,
  parameter int unsigned WU_LEN       = tic_pkg::WU_LEN,
  parameter int unsigned SUB_K        = tic_pkg::SUB_K,
  parameter int unsigned PERIOD_CNT_W = tic_pkg::PERIOD_CNT_W,
  parameter int unsigned FRAC_W       = tic_pkg::FRAC_W,
  parameter int unsigned CAL_SAMPLES  = tic_pkg::CAL_SAMPLES,
  parameter int unsigned FIFO_DEPTH   = tic_pkg::FIFO_DEPTH
) (
  input  logic                                            clk_main,   // 300 MHz
  input  logic                                            clk_sys,    // 100 MHz
  input  logic                                            rst_n,      // asynchronous, active low
  input  logic [N_CHANNELS-1:0]                           meas_in,    // measured signals
  input  logic                                            cal_in,     // calibrator square wave
  input  logic                                            cal_req,    // calibration request (clk_sys)
  output logic                                            cal_busy,   // any channel calibrating
  input  logic [N_CHANNELS-1:0]                           rd_en,
  output logic [N_CHANNELS-1:0][PERIOD_CNT_W+FRAC_W-1:0]  rd_data,
  output logic [N_CHANNELS-1:0]                           rd_valid,
  output logic [N_CHANNELS-1:0]                           empty,
  output logic [N_CHANNELS-1:0]                           overflow
);

  logic [PERIOD_CNT_W-1:0] count;
  logic                    boot;       // start-up calibration still to be started
  logic                    cal_start;
  logic [N_CHANNELS-1:0]   busy;

  period_counter #(.WIDTH(PERIOD_CNT_W)) u_pcnt (.clk(clk_main), .rst_n, .count);

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) boot <= 1'b1;
    else        boot <= 1'b0;
  end

  assign cal_start = boot | cal_req;
  assign cal_busy  = |busy;

  for (genvar c = 0; c < int'(N_CHANNELS); c++) begin : g_ch
    tic_channel #(
      .NUM_TDL(NUM_TDL), .TDL_LEN(TDL_LEN), .WU_LEN(WU_LEN), .SUB_K(SUB_K),
      .PERIOD_CNT_W(PERIOD_CNT_W), .FRAC_W(FRAC_W), .CAL_SAMPLES(CAL_SAMPLES),
      .FIFO_DEPTH(FIFO_DEPTH), .SEED_BASE(1 + 16 * c)
    ) u_ch (
      .clk_main, .clk_sys, .rst_n, .meas_in(meas_in[c]), .cal_in, .count,
      .cal_start, .cal_busy(busy[c]),
      .rd_en(rd_en[c]), .rd_data(rd_data[c]), .rd_valid(rd_valid[c]),
      .empty(empty[c]), .overflow(overflow[c])
    );
  end

endmodule
