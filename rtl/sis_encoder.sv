// SIS encoder: compresses the raw wave-union delay-line data to one code.
//
// Each delay line of TDL_LEN taps is split into SUB_K sub-lines: sub-line j
// holds taps j, j+SUB_K, j+2*SUB_K, ... Bubbles never span more than SUB_K
// neighbouring taps, so every sub-line is a clean pattern of zeros, ones,
// zeros. Two priority encoders look at each sub-line from opposite ends:
// the one from the least significant tap counts the zeros below the first
// one (the position of the 0-1 transition); the one from the most significant
// tap counts the zeros above the last one, and that count is subtracted from
// the sub-line length L = TDL_LEN/SUB_K (the position of the 1-0
// transition). Both grow with the measured interval. The 2*SUB_K*NUM_TDL
// partial results are summed into result_r (all 0-1 positions), result_f
// (all 1-0 positions) and code = result_r + result_f. An empty sub-line gives
// L and 0.
//
// The decomposition, the two opposite priority encoders, the subtraction
// from L and the summing follow the described device, as do its sizes
// (4 lines of 148 taps, step 4). Splitting the work into two register stages
// is this design's choice.
//
// Timing: two cycles from in_valid to out_valid, one result per cycle.
`timescale 1ps/1fs
module sis_encoder #(
  parameter int unsigned NUM_TDL = tic_pkg::NUM_TDL,
  parameter int unsigned TDL_LEN = tic_pkg::TDL_LEN,
  parameter int unsigned SUB_K   = tic_pkg::SUB_K,
  parameter int unsigned CODE_W  = tic_pkg::code_width(NUM_TDL, TDL_LEN, SUB_K)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [NUM_TDL*TDL_LEN-1:0] raw,       // line t occupies bits t*TDL_LEN +: TDL_LEN
  output logic                       out_valid,
  output logic [CODE_W-1:0]          result_r,  // sum of 0-1 transition positions
  output logic [CODE_W-1:0]          result_f,  // sum of 1-0 transition positions
  output logic [CODE_W-1:0]          code       // result_r + result_f
);

  localparam int unsigned L     = TDL_LEN / SUB_K;   // taps per sub-line
  localparam int unsigned NSUB  = NUM_TDL * SUB_K;   // sub-lines in all
  localparam int unsigned POS_W = $clog2(L + 1);

  // Zeros below the first one, scanning from the least significant tap.
  function automatic logic [POS_W-1:0] zeros_from_lsb(logic [L-1:0] v);
    logic [POS_W-1:0] n;
    n = POS_W'(L);
    for (int i = int'(L) - 1; i >= 0; i--)
      if (v[i]) n = POS_W'(i);
    return n;
  endfunction

  // Zeros above the last one, scanning from the most significant tap.
  function automatic logic [POS_W-1:0] zeros_from_msb(logic [L-1:0] v);
    logic [POS_W-1:0] n;
    n = POS_W'(L);
    for (int i = 0; i < int'(L); i++)
      if (v[i]) n = POS_W'(int'(L) - 1 - i);
    return n;
  endfunction

  logic [NSUB-1:0][POS_W-1:0] pos_r_d, pos_f_d;  // partial results
  logic [NSUB-1:0][POS_W-1:0] pos_r_q, pos_f_q;
  logic                       valid_q;

  always_comb begin
    for (int t = 0; t < int'(NUM_TDL); t++) begin
      for (int j = 0; j < int'(SUB_K); j++) begin
        logic [L-1:0] sub;
        for (int b = 0; b < int'(L); b++) sub[b] = raw[t*TDL_LEN + b*SUB_K + j];
        pos_r_d[t*SUB_K + j] = zeros_from_lsb(sub);
        pos_f_d[t*SUB_K + j] = POS_W'(L) - zeros_from_msb(sub);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      out_valid <= 1'b0;
      pos_r_q   <= '0;
      pos_f_q   <= '0;
      result_r  <= '0;
      result_f  <= '0;
      code      <= '0;
    end else begin
      valid_q   <= in_valid;
      out_valid <= valid_q;
      if (in_valid) begin
        pos_r_q <= pos_r_d;
        pos_f_q <= pos_f_d;
      end
      if (valid_q) begin
        logic [CODE_W-1:0] sr, sf;
        sr = '0;
        sf = '0;
        for (int s = 0; s < int'(NSUB); s++) begin
          sr += CODE_W'(pos_r_q[s]);
          sf += CODE_W'(pos_f_q[s]);
        end
        result_r <= sr;
        result_f <= sf;
        code     <= sr + sf;
      end
    end
  end

endmodule
