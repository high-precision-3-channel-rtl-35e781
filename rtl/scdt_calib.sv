// Calibration engine: statistical code density test (SCDT).
//
// During calibration the channel measures a square wave that is uncorrelated
// with the main clock, so events fall uniformly over the clock period. The
// engine counts how often each address {phase, code} occurs. Once
// CAL_SAMPLES events are counted, the share of events that produced a code is
// the width of that code's bin as a fraction of the clock period. One pass
// over the histogram, 0 degree codes first and then 180 degree codes, sums
// the counts and writes, for each address, the time from the start of the
// period to the middle of its bin:
//
//   T(a) = (sum of counts below a + count(a)/2) / CAL_SAMPLES * 2^FRAC_W
//
// in units of T_CLK/2^FRAC_W. For 180 degree codes the sum already holds all
// 0 degree counts, so the table also holds the measured length of the
// 0 degree half period, i.e. T_FIS, and any inequality of the two halves is
// taken into account. The division is a multiplication by a reciprocal
// computed at elaboration.
//
// The test itself, its sample count (2 million) and its purpose (the table
// of transfer characteristics kept in block RAM) follow the described device.
// The sequence (clear the histogram, collect, build the table in one pass)
// and the bin-centre rule are this design's choices.
//
// Timing: start is a one-cycle pulse. Clearing takes 2^ADDR_W cycles,
// collecting lasts until CAL_SAMPLES samples were counted, building takes
// 2^ADDR_W + 2 cycles; busy is high throughout. Samples are read-modify-write
// and must be at least two cycles apart (the channel dead time ensures it).
`timescale 1ps/1fs
module scdt_calib #(
  parameter int unsigned ADDR_W      = 12,
  parameter int unsigned FRAC_W      = tic_pkg::FRAC_W,
  parameter int unsigned CAL_SAMPLES = tic_pkg::CAL_SAMPLES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,         // begin a calibration
  output logic              busy,          // calibration in progress
  output logic              collecting,    // samples are being counted
  input  logic              sample_valid,  // one event, address below
  input  logic [ADDR_W-1:0] sample_addr,   // {phase180, code}
  output logic              lut_we,        // transfer table write
  output logic [ADDR_W-1:0] lut_waddr,
  output logic [FRAC_W-1:0] lut_wdata
);

  localparam int unsigned CNT_W  = $clog2(CAL_SAMPLES + 1);
  localparam int unsigned DEPTH  = 1 << ADDR_W;
  localparam int unsigned SHIFT  = 30;
  // 2^(FRAC_W+SHIFT-1) / CAL_SAMPLES, rounded: the argument is 2*sum+count.
  localparam longint unsigned RECIP =
      ((64'd1 << (FRAC_W + SHIFT - 1)) + 64'(CAL_SAMPLES / 2)) / 64'(CAL_SAMPLES);
  localparam int unsigned RECIP_W = $clog2(RECIP + 1);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_COLLECT, S_BUILD} state_t;
  state_t state;

  logic [ADDR_W-1:0] addr;          // clear / build address counter
  logic [CNT_W-1:0]  samples;       // samples counted so far
  logic [CNT_W-1:0]  cum;           // running sum during the build pass
  logic              rd_pend;       // histogram read issued last cycle
  logic [ADDR_W-1:0] rd_addr_q;     // address of that read
  logic              last_q;        // that read was the last of the pass
  logic              h_we;
  logic [ADDR_W-1:0] h_waddr, h_raddr;
  logic [CNT_W-1:0]  h_wdata, h_rdata;
  logic              h_re;

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(CNT_W)) u_hist (
    .clk, .we(h_we), .waddr(h_waddr), .wdata(h_wdata),
    .re(h_re), .raddr(h_raddr), .rdata(h_rdata)
  );

  assign busy       = (state != S_IDLE);
  assign collecting = (state == S_COLLECT);

  // Histogram ports.
  always_comb begin
    h_re    = 1'b0;
    h_raddr = addr;
    h_we    = 1'b0;
    h_waddr = rd_addr_q;
    h_wdata = h_rdata + 1'b1;
    unique case (state)
      S_CLEAR: begin
        h_we    = 1'b1;
        h_waddr = addr;
        h_wdata = '0;
      end
      S_COLLECT: begin
        h_re    = sample_valid;
        h_raddr = sample_addr;
        h_we    = rd_pend;
      end
      S_BUILD: h_re = ~last_q;
      default: ;
    endcase
  end

  // Bin-centre time of the address read last cycle.
  logic [CNT_W:0]           twice_mid;
  logic [CNT_W+RECIP_W:0]   prod;
  logic [FRAC_W-1:0]        t_mid;
  assign twice_mid = {cum, 1'b0} + (CNT_W+1)'(h_rdata);
  assign prod      = (CNT_W+RECIP_W+1)'(twice_mid) * (CNT_W+RECIP_W+1)'(RECIP);
  assign t_mid     = (prod[CNT_W+RECIP_W:SHIFT] >= (1 << FRAC_W)) ? '1 : prod[SHIFT +: FRAC_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr      <= '0;
      samples   <= '0;
      cum       <= '0;
      rd_pend   <= 1'b0;
      rd_addr_q <= '0;
      last_q    <= 1'b0;
      lut_we    <= 1'b0;
      lut_waddr <= '0;
      lut_wdata <= '0;
    end else begin
      lut_we  <= 1'b0;
      rd_pend <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_CLEAR;
            addr  <= '0;
          end
        end
        S_CLEAR: begin
          addr <= addr + 1'b1;
          if (addr == ADDR_W'(DEPTH - 1)) begin
            state   <= S_COLLECT;
            samples <= '0;
          end
        end
        S_COLLECT: begin
          if (sample_valid) begin
            rd_pend   <= 1'b1;
            rd_addr_q <= sample_addr;
          end
          if (rd_pend) begin
            samples <= samples + 1'b1;
            if (samples == CNT_W'(CAL_SAMPLES - 1)) begin
              state  <= S_BUILD;
              addr   <= '0;
              cum    <= '0;
              last_q <= 1'b0;
            end
          end
        end
        S_BUILD: begin
          // Read address addr; one cycle later its count is in h_rdata.
          if (!last_q) begin
            rd_pend   <= 1'b1;
            rd_addr_q <= addr;
            addr      <= addr + 1'b1;
            last_q    <= (addr == ADDR_W'(DEPTH - 1));
          end
          if (rd_pend) begin
            lut_we    <= 1'b1;
            lut_waddr <= rd_addr_q;
            lut_wdata <= t_mid;
            cum       <= cum + h_rdata;
          end else if (last_q) begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Read-modify-write of the histogram needs samples at least two cycles apart.
  a_sample_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_COLLECT && sample_valid) |=> !sample_valid);

endmodule
