// Shared constants and types of the 3-channel time interval counter.
//
// The counter timestamps events on a common coarse timescale (a free-running
// period counter on the 300 MHz main clock) and refines each timestamp with a
// two-stage interpolator: a first stage that tells which half of the clock
// period the event fell into, and a second stage built from four wave-union
// tapped delay lines. The numbers below are those of the described device:
// 3 channels, a 40-bit period counter, 4 delay lines of 148 taps each with a
// 20-stage wave-union launcher, sub-TDL decomposition with a step of 4 taps,
// a 14-bit fraction of the clock period and 2 million calibration samples.
// The FIFO depth is this design's choice; it is not given for the device.
`timescale 1ps/1fs
package tic_pkg;

  parameter int unsigned N_CHANNELS   = 3;          // measurement channels
  parameter int unsigned PERIOD_CNT_W = 40;         // period counter width
  parameter int unsigned NUM_TDL      = 4;          // independent WU delay lines per TDC
  parameter int unsigned TDL_LEN      = 148;        // carry-chain taps per delay line
  parameter int unsigned WU_LEN       = 20;         // launcher stages at the start of a line
  parameter int unsigned SUB_K        = 4;          // sub-TDL step (bubble span)
  parameter int unsigned FRAC_W       = 14;         // fraction of T_CLK: 3.33 ns / 2^14
  parameter int unsigned CAL_SAMPLES  = 2_000_000;  // SCDT sample count
  parameter int unsigned FIFO_DEPTH   = 512;        // timestamps buffered per channel

  // Width of the compressed SIS code: the sum of 2 edge positions for each of
  // SUB_K sub-TDLs of NUM_TDL lines, each position in 0..TDL_LEN/SUB_K.
  function automatic int unsigned code_width(int unsigned ntdl, int unsigned len,
                                             int unsigned k);
    return $clog2(2 * ntdl * k * (len / k) + 1);
  endfunction

  // A timestamp: whole main-clock periods and a fraction in units of T_CLK/2^FRAC_W.
  // The 54-bit value {periods, fraction} is the time in units of T_CLK/2^FRAC_W.
  typedef struct packed {
    logic [PERIOD_CNT_W-1:0] periods;
    logic [FRAC_W-1:0]       fraction;
  } timestamp_t;

  localparam int unsigned TS_W = PERIOD_CNT_W + FRAC_W;

endpackage
