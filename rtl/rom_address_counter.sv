// rom_address_counter: selects the sine ROM location.
//
// Steps a location index 0, 1, ... DEPTH-1 and wraps, one step per clock edge
// on which `advance` is high. In the controller `advance` is the sample timer's
// tick, so the reference moves to the next of its 500 samples every 1667
// clocks, and the whole table is read once per 60 Hz period.
//
// Interface: clk, clr (asynchronous, active high), advance, addr.
// Timing: addr changes on the clock edge at which advance is sampled high.
// Follows the reference design's location counter; `wrap` (high while the
// last location is held and advance is high) is an added status output.
module rom_address_counter #(
  parameter int unsigned DEPTH = dspwm_pkg::ROM_DEPTH,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          advance,
  output logic [AW-1:0] addr,
  output logic          wrap
);

  assign wrap = advance && (addr == AW'(DEPTH-1));

  always_ff @(posedge clk or posedge clr) begin
    if (clr)          addr <= '0;
    else if (wrap)    addr <= '0;
    else if (advance) addr <= addr + 1'b1;
  end

endmodule
