// carrier_comparator_bank: level-shifted carriers and the PWM comparators.
//
// Phase-disposition multilevel PWM: the main triangular carrier (0..STEP) is
// copied N times, copy k (k = 1..N) shifted up by (k-1)*STEP, so the N copies
// are stacked without overlap and all in phase, covering 0..N*STEP. The
// modulating signal is compared with every copy at once:
//   pulse[k-1] = 1 when modulating > carrier k, 0 otherwise
// (equality gives 0). Because the carriers are stacked, the pulses form a
// thermometer code and their number of ones, 0..N, is the output level
// counted from the bottom (level = ones - N/2 for the 27-level converter).
//
// Interface: clk, clr (asynchronous, active high), modulating (CODE_W bits),
// carrier (the main triangle, 0..STEP), pulse[N-1:0] (bit k-1 is the pulse
// train of carrier k).
// Timing: pulse is registered, one clock after its inputs.
// The offsets, the count of 26 carriers and the comparison rule follow the
// reference design; registering the comparator outputs and the tie rule are
// this design's own choices.
module carrier_comparator_bank #(
  parameter int unsigned N      = dspwm_pkg::N_CARRIERS,
  parameter int unsigned STEP   = dspwm_pkg::CARRIER_STEP,
  parameter int unsigned CODE_W = dspwm_pkg::CODE_W,
  localparam int unsigned CW    = $clog2(STEP+1)
) (
  input  logic              clk,
  input  logic              clr,
  input  logic [CODE_W-1:0] modulating,
  input  logic [CW-1:0]     carrier,
  output logic [N-1:0]      pulse
);

  logic [N-1:0] cmp;

  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      // carrier k+1 = main triangle + k * STEP, one bit wider to avoid overflow
      cmp[k] = ({1'b0, modulating} > ((CODE_W+1)'(carrier) + (CODE_W+1)'(k * STEP)));
    end
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) pulse <= '0;
    else     pulse <= cmp;
  end

  // Stacked carriers: a higher carrier can only be exceeded if all lower ones are.
  for (genvar k = 1; k < int'(N); k++) begin : g_thermo
    a_thermometer: assert property (@(posedge clk) disable iff (clr) pulse[k] |-> pulse[k-1]);
  end

endmodule
