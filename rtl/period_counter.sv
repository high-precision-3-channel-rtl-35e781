// Period counter: the common coarse timescale shared by all channels.
//
// A free-running binary counter advanced by every rising edge of the main
// clock. At 40 bits and 300 MHz it wraps after 2^40 * 3.33 ns, about one
// hour, which is the measurement range of the counter. Width and clock follow
// the described device; the synchronous start from zero after reset is this
// design's choice.
//
// Timing: count holds k during the k-th main clock period after reset.
`timescale 1ps/1fs
module period_counter #(
  parameter int unsigned WIDTH = tic_pkg::PERIOD_CNT_W
) (
  input  logic             clk,    // main clock
  input  logic             rst_n,  // asynchronous reset, active low
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

endmodule
