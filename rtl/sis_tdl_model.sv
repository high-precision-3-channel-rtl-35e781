// Behavioural model of one wave-union delay line of the second interpolation
// stage (SIS), together with its capture register. Not synthesizable: the
// real line is a chain of FPGA carry-chain multiplexers whose function is its
// propagation delay, which logic cannot express.
//
// The line has TDL_LEN taps. Its first WU_LEN stages form the wave-union
// launcher: while idle the first WU_LEN-1 taps are high and the rest low.
// The event toggles the first and the last launcher stage, so a 0 front enters
// at tap 0 and a 1 front at tap WU_LEN-1: a pulse of ones about WU_LEN-1 taps
// wide then travels towards the last tap, and only the TDL_LEN-WU_LEN+1 taps
// after the launcher serve its leading edge. The rising edge of the FIS
// `phase` signal captures all taps in the register `q` (bit 0 is the first
// tap).
//
// Each stage delay is drawn once, at start-up, uniformly between TAU_MIN_PS
// and TAU_MAX_PS (16 ps on average, as in the described device) from a
// generator seeded with SEED, so that lines differ as real ones do. Every tap
// also gets a fixed skew of up to +-SKEW_PS, which reorders neighbouring taps
// and produces the bubbles the encoder has to tolerate; taps SUB_K apart keep
// their order. OFFSET_PS is the difference between the clock path of `phase`
// and the event path. The FIS raises `phase` one to one and a half main clock
// periods after the event; OFFSET_PS removes that fixed part, so the line sees
// the sub-period interval plus a small margin. The default suits a 3334 ps
// main clock. Delay values, skew and offset are this model's own choices.
//
// Timing: q changes only at rising edges of phase_clk.
`timescale 1ps/1fs
module sis_tdl_model #(
  parameter int unsigned TDL_LEN    = tic_pkg::TDL_LEN,
  parameter int unsigned WU_LEN     = tic_pkg::WU_LEN,
  parameter int unsigned SEED       = 1,
  parameter real         TAU_MIN_PS = 8.0,
  parameter real         TAU_MAX_PS = 24.0,
  parameter real         SKEW_PS    = 6.0,
  parameter real         OFFSET_PS  = 3184.0
) (
  input  logic               event_i,    // event from the input circuit
  input  logic               phase_clk,  // FIS phase signal, captures on its rising edge
  output logic [TDL_LEN-1:0] q           // captured taps, bit 0 nearest the launcher
);

  real         tail_at [TDL_LEN];  // time the 0 front reaches each tap
  real         head_at [TDL_LEN];  // time the 1 front reaches each tap
  real         t_event;
  int unsigned lcg_state;

  function automatic real next_uniform(ref int unsigned s);
    s = s * 32'd1664525 + 32'd1013904223;
    return real'(s) / 4294967296.0;
  endfunction

  initial begin
    real cum;
    real skew;
    cum       = 0.0;
    lcg_state = SEED * 32'd2654435761 + 32'd12345;
    for (int i = 0; i < int'(TDL_LEN); i++) begin
      cum        += TAU_MIN_PS + (TAU_MAX_PS - TAU_MIN_PS) * next_uniform(lcg_state);
      skew        = SKEW_PS * (2.0 * next_uniform(lcg_state) - 1.0);
      tail_at[i]  = cum + skew;
    end
    for (int i = 0; i < int'(TDL_LEN); i++)
      head_at[i] = (i >= int'(WU_LEN) - 1) ? tail_at[i] - tail_at[WU_LEN-2] : 0.0;
    t_event = 0.0;
    for (int i = 0; i < int'(TDL_LEN); i++) q[i] = (i < int'(WU_LEN) - 1);
  end

  always @(posedge event_i) t_event <= $realtime;

  always @(posedge phase_clk) begin
    real dt;
    logic [TDL_LEN-1:0] taps;
    dt = $realtime - t_event - OFFSET_PS;
    for (int i = 0; i < int'(TDL_LEN); i++) begin
      if (!event_i)                  taps[i] = (i < int'(WU_LEN) - 1);
      else if (i < int'(WU_LEN) - 1) taps[i] = (dt < tail_at[i]);
      else                           taps[i] = (dt >= head_at[i]) && (dt < tail_at[i]);
    end
    q <= taps;
  end

endmodule
