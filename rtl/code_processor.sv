// Code processor of one channel: turns the raw interpolator data of an event
// into a timestamp, and calibrates the interpolator.
//
// For every event the conversion controller hands over the captured
// delay-line data, the FIS result and the period count N. The SIS encoder
// compresses the delay-line data to one code. The code and the FIS phase
// address the transfer table in block RAM, which holds, for every code, the
// time from the start of the clock period to the middle of the code's bin
// (T_FIS + T_SIS), in units of T_CLK/2^FRAC_W. The timestamp, in the same
// units, is
//
//   TS = N_eff * 2^FRAC_W - table[{phase180, code}]
//
// where N_eff is the count of the main clock edge that follows the event:
// the period register latches one count later when the 0 degree
// synchroniser answers, so N_eff = N - 1 then and N_eff = N otherwise.
//
// Events taken while a calibration runs are marked; their codes go to the
// SCDT engine instead, which rebuilds the table, and give no timestamp. `cal_start`
// starts one; the device calibrates at start-up and on request.
//
// Compression, table look-up in block RAM, the timestamp formula and the
// calibration by SCDT follow the described device; the fraction has 14 bits
// as there. The pipeline, the table contents (bin centres) and N_eff are this
// design's choices.
//
// Timing: ts_valid follows in_valid by 5 cycles of the system clock; one
// event per cycle could be accepted outside calibration, but the channel
// delivers at most one every few cycles.
`timescale 1ps/1fs
module code_processor #(
  parameter int unsigned NUM_TDL      = tic_pkg::NUM_TDL,
  parameter int unsigned TDL_LEN      = tic_pkg::TDL_LEN,
  parameter int unsigned SUB_K        = tic_pkg::SUB_K,
  parameter int unsigned PERIOD_CNT_W = tic_pkg::PERIOD_CNT_W,
  parameter int unsigned FRAC_W       = tic_pkg::FRAC_W,
  parameter int unsigned CAL_SAMPLES  = tic_pkg::CAL_SAMPLES
) (
  input  logic                           clk,        // system clock (100 MHz)
  input  logic                           rst_n,
  input  logic                           cal_start,  // start a calibration (pulse)
  output logic                           cal_busy,   // calibration in progress
  input  logic                           in_valid,   // one captured event
  input  logic [NUM_TDL*TDL_LEN-1:0]     sis_raw,    // delay-line data
  input  logic                           t_fis,      // 1: 0 degree, 0: 180 degree
  input  logic [PERIOD_CNT_W-1:0]        n_raw,      // period register
  output logic                           ts_valid,
  output logic [PERIOD_CNT_W+FRAC_W-1:0] ts          // timestamp, units T_CLK/2^FRAC_W
);

  localparam int unsigned CODE_W = tic_pkg::code_width(NUM_TDL, TDL_LEN, SUB_K);
  localparam int unsigned ADDR_W = CODE_W + 1;
  localparam int unsigned TS_W   = PERIOD_CNT_W + FRAC_W;

  // Stage 0: input register.
  logic                         v0;
  logic [NUM_TDL*TDL_LEN-1:0]   raw0;
  logic                         ph0;      // 1: 180 degree phase
  logic [PERIOD_CNT_W-1:0]      n0;
  // Stages 1-2: encoder; side data follows in a shift register.
  logic                         cal0;     // event taken during a calibration
  logic [1:0]                   cal_sr;
  logic [1:0]                   ph_sr;
  logic [1:0][PERIOD_CNT_W-1:0] n_sr;
  logic                         enc_valid;
  logic [CODE_W-1:0]            code, res_r, res_f;
  // Stage 3: table read.
  logic                         v3;
  logic [PERIOD_CNT_W-1:0]      n3;
  logic [FRAC_W-1:0]            lut_rdata;
  // Calibration.
  logic                         collecting;
  logic                         lut_we;
  logic [ADDR_W-1:0]            lut_waddr;
  logic [FRAC_W-1:0]            lut_wdata;
  logic [ADDR_W-1:0]            addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0   <= 1'b0;
      cal0 <= 1'b0;
      raw0 <= '0;
      ph0  <= 1'b0;
      n0   <= '0;
    end else begin
      v0 <= in_valid;
      if (in_valid) begin
        cal0 <= cal_busy;
        raw0 <= sis_raw;
        ph0  <= ~t_fis;
        n0   <= t_fis ? n_raw - 1'b1 : n_raw;
      end
    end
  end

  sis_encoder #(.NUM_TDL(NUM_TDL), .TDL_LEN(TDL_LEN), .SUB_K(SUB_K), .CODE_W(CODE_W)) u_enc (
    .clk, .rst_n, .in_valid(v0), .raw(raw0),
    .out_valid(enc_valid), .result_r(res_r), .result_f(res_f), .code
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cal_sr <= '0;
      ph_sr  <= '0;
      n_sr   <= '0;
    end else begin
      cal_sr <= {cal_sr[0], cal0};
      ph_sr <= {ph_sr[0], ph0};
      n_sr  <= {n_sr[0], n0};
    end
  end

  assign addr = {ph_sr[1], code};

  scdt_calib #(.ADDR_W(ADDR_W), .FRAC_W(FRAC_W), .CAL_SAMPLES(CAL_SAMPLES)) u_cal (
    .clk, .rst_n, .start(cal_start), .busy(cal_busy), .collecting,
    .sample_valid(enc_valid & cal_sr[1] & collecting), .sample_addr(addr),
    .lut_we, .lut_waddr, .lut_wdata
  );

  // Transfer table of the two-stage interpolator.
  sdp_ram #(.DEPTH(1 << ADDR_W), .WIDTH(FRAC_W)) u_lut (
    .clk, .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .re(enc_valid), .raddr(addr), .rdata(lut_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3       <= 1'b0;
      n3       <= '0;
      ts_valid <= 1'b0;
      ts       <= '0;
    end else begin
      v3       <= enc_valid & ~cal_sr[1];
      if (enc_valid) n3 <= n_sr[1];
      ts_valid <= v3;
      if (v3) ts <= {n3, {FRAC_W{1'b0}}} - TS_W'(lut_rdata);
    end
  end

endmodule
