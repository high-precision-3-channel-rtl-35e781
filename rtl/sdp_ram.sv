// Simple dual-port RAM with one write port and one synchronous read port,
// written so that FPGA tools map it to block RAM. Used for the calibration
// histogram, the TDC transfer table and the timestamp FIFOs.
//
// Timing: a write takes effect at the clock edge; read data appears one cycle
// after the read address. Reading an address in the cycle it is written
// returns the old content.
`timescale 1ps/1fs
module sdp_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
