// Conversion controller of one channel, in the system clock domain.
//
// Waits for the FIS `phase` signal, brought into the system clock domain by
// two flip-flops. When it is seen high, all interpolator results are stable
// (the SIS register, the FIS result and the period register were written at
// least one system clock earlier), so `capture` tells the code processor to
// take them in that very cycle. At the same time `clear` ends the conversion:
// it resets the input flip-flop and the FIS asynchronously, for CLEAR_CYCLES
// cycles. Two further cycles let the synchroniser forget the old `phase`
// before a new event is looked for; an event arriving after clear is released
// is kept by the input flip-flop and taken then.
//
// In the described device the input flip-flop stays set until the conversion
// is over, and a channel is blind for about 40 ns per event; how the end of a
// conversion is signalled is this design's choice. Here the dead time, from
// the event to the release of clear, is 2 to 4 system clock cycles plus
// CLEAR_CYCLES, i.e. 30 to 50 ns at 100 MHz with the default.
`timescale 1ps/1fs
module conv_ctrl #(
  parameter int unsigned CLEAR_CYCLES = 1
) (
  input  logic clk,      // system clock (100 MHz)
  input  logic rst_n,
  input  logic phase,    // FIS phase signal (main clock domain)
  output logic capture,  // take the interpolator results now
  output logic clear     // end of conversion, to input circuit and FIS
);

  localparam int unsigned WAIT_W = $clog2(CLEAR_CYCLES + 3);

  logic [1:0]        sync;
  logic [WAIT_W-1:0] wait_cnt;
  logic              busy;

  assign capture = sync[1] & ~busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync     <= '0;
      busy     <= 1'b0;
      clear    <= 1'b0;
      wait_cnt <= '0;
    end else begin
      sync <= {sync[0], phase};
      if (capture) begin
        busy     <= 1'b1;
        clear    <= 1'b1;
        wait_cnt <= WAIT_W'(CLEAR_CYCLES + 1);
      end else if (busy) begin
        // wait_cnt counts the cycles left in which `phase` may still be stale
        if (wait_cnt == WAIT_W'(2)) clear <= 1'b0;
        if (wait_cnt == WAIT_W'(1)) busy <= 1'b0;
        wait_cnt <= wait_cnt - 1'b1;
      end
    end
  end

endmodule
