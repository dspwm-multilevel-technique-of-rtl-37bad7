// triangle_gen: the main triangular carrier.
//
// While the carrier timer's count is below HALF (the first half of the carrier
// period) the carrier climbs; in the second half it falls back. It moves in
// unit stairs: an accumulator adds PEAK every clock and, each time it reaches
// HALF, the carrier takes one step and the accumulator drops by HALF. Over
// HALF clocks the carrier therefore climbs exactly PEAK steps, evenly spread,
// and over the next HALF clocks it falls exactly PEAK steps back to zero, so
// the waveform repeats without drift. With PEAK == HALF it steps on every
// clock, which is the plain up/down counter of the reference design.
//
// The reference design's timing (rise for 1500 clocks, fall for 1500 clocks)
// and its carrier level spacing of 350 codes are both kept; the staircase
// scaling that reconciles the two (peak 350 reached in 1500 clocks) is this
// design's own choice.
//
// Interface: clk, clr (asynchronous, active high), phase (the carrier timer's
// count, 0 .. 2*HALF-1), carrier (0 .. PEAK), rising (first half of period).
// Timing: carrier is registered; it reflects the steps taken on all clock
// edges up to and including the last one.
module triangle_gen #(
  parameter int unsigned HALF = dspwm_pkg::CARRIER_DIV / 2,
  parameter int unsigned PEAK = dspwm_pkg::CARRIER_STEP,
  localparam int unsigned PW  = $clog2(2*HALF),
  localparam int unsigned CW  = $clog2(PEAK+1),
  localparam int unsigned AW  = $clog2(HALF+PEAK+1)
) (
  input  logic          clk,
  input  logic          clr,
  input  logic [PW-1:0] phase,
  output logic [CW-1:0] carrier,
  output logic          rising
);

  logic [AW-1:0] acc;
  logic [AW-1:0] acc_sum;
  logic          step;

  assign rising  = (phase < PW'(HALF));
  assign acc_sum = acc + AW'(PEAK);
  assign step    = (acc_sum >= AW'(HALF));

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      acc     <= '0;
      carrier <= '0;
    end else begin
      acc <= step ? acc_sum - AW'(HALF) : acc_sum;
      if (step) begin
        if (rising) carrier <= carrier + 1'b1;
        else        carrier <= carrier - 1'b1;
      end
    end
  end

  // The carrier never leaves 0..PEAK when the phase input is the carrier timer.
  property p_in_range;
    @(posedge clk) carrier <= CW'(PEAK);
  endproperty
  a_in_range: assert property (p_in_range);

endmodule
