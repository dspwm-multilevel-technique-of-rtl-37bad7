// sample_timer: paces the sine reference.
//
// A free-running counter that counts 0, 1, ... DIV-1 and wraps. With the
// reference design's 50 MHz clock and DIV = 1667 it wraps every 1667 clocks;
// 500 samples per sine period then give 50e6 / (1667 * 500) = 59.99 Hz.
// `tick` is high during the single clock in which the count is 0 and tells the
// ROM address counter to advance on that clock edge.
//
// Interface: clk, clr (asynchronous, active high, as in the reference design),
// count (current value), tick (count == 0).
// Timing: count follows the clock edge; tick is combinational from count.
// The count range and the asynchronous clear follow the reference design; the
// separate tick output is this design's own.
module sample_timer #(
  parameter int unsigned DIV = dspwm_pkg::SAMPLE_DIV,
  localparam int unsigned W  = (DIV > 1) ? $clog2(DIV) : 1
) (
  input  logic         clk,
  input  logic         clr,
  output logic [W-1:0] count,
  output logic         tick
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)                     count <= '0;
    else if (count == W'(DIV-1)) count <= '0;
    else                         count <= count + 1'b1;
  end

  assign tick = (count == '0);

endmodule
