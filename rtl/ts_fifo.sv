// Timestamp FIFO of one channel, in block RAM.
//
// Buffers finished timestamps until the host interface reads them. A write
// into a full FIFO is dropped and sets the sticky `overflow` flag, which
// stays set until reset; `dropped` counts such losses (saturating). The
// device buffers timestamps in a block-RAM FIFO before sending them over USB;
// depth, read interface and overflow handling are this design's choices.
//
// Timing: synchronous to one clock. After rd_en with the FIFO not empty,
// rd_data holds the oldest word from the next cycle on (rd_valid marks it).
`timescale 1ps/1fs
module ts_fifo #(
  parameter int unsigned WIDTH = tic_pkg::TS_W,
  parameter int unsigned DEPTH = tic_pkg::FIFO_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic [15:0]      dropped
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW:0] wptr, rptr;
  logic        do_wr, do_rd;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign do_wr = wr_en & ~full;
  assign do_rd = rd_en & ~empty;

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mem (
    .clk, .we(do_wr), .waddr(wptr[AW-1:0]), .wdata(wr_data),
    .re(do_rd), .raddr(rptr[AW-1:0]), .rdata(rd_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      rd_valid <= 1'b0;
      overflow <= 1'b0;
      dropped  <= '0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      if (wr_en && full) begin
        overflow <= 1'b1;
        if (dropped != '1) dropped <= dropped + 1'b1;
      end
    end
  end

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    full |=> !(wptr != $past(wptr)));

endmodule
