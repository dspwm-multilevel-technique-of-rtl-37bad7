// carrier_timer: sets the carrier period.
//
// A free-running counter 0 .. DIV-1. With DIV = 3000 and a 50 MHz clock the
// triangular carriers run at 16.67 kHz. The triangle generator rises while
// count < DIV/2 and falls otherwise.
//
// Interface: clk, clr (asynchronous, active high), count.
// Timing: count changes on every clock edge.
// The count range follows the reference design.
module carrier_timer #(
  parameter int unsigned DIV = dspwm_pkg::CARRIER_DIV,
  localparam int unsigned W  = (DIV > 1) ? $clog2(DIV) : 1
) (
  input  logic         clk,
  input  logic         clr,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)                     count <= '0;
    else if (count == W'(DIV-1)) count <= '0;
    else                         count <= count + 1'b1;
  end

endmodule
