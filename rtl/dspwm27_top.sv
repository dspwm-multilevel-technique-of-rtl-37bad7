// dspwm27_top: 27-level digital sinusoidal PWM controller for a converter of
// three cascaded H-bridges with DC sources in the ratio 9:3:1.
//
// Datapath, all driven by one clock (50 MHz in the reference design):
//   sample_timer -> rom_address_counter -> sine_rom       : 60 Hz reference
//   carrier_timer -> triangle_gen                          : main carrier
//   carrier_comparator_bank (26 stacked carriers, compare) : 26 pulse trains
//   hbridge_switch_logic                                   : 12 gate signals
// The reference moves to the next of 500 samples every SAMPLE_DIV clocks; the
// carrier rises for CARRIER_DIV/2 clocks and falls for CARRIER_DIV/2 clocks.
// The gate signals make the converter output (9*d1 + 3*d2 + d3) * Vdc equal,
// level for level, to the number of carriers the reference is above minus 13.
//
// Interface: clk, clr (asynchronous, active high; all gates off), and outputs
// gates (bridge 1 at index 0), pulse (the 26 comparator outputs), modulating
// (the reference code), carrier (the main triangle) and sample_addr (the ROM
// location being played).
// Timing: the ROM output follows its address by one clock, the pulses follow
// the reference and carrier by one clock and the gates follow the pulses by one
// clock. The structure and the timing constants follow the reference design;
// the pipeline registers are this design's own.
module dspwm27_top
  import dspwm_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV_P  = SAMPLE_DIV,
  parameter int unsigned ROM_DEPTH_P   = ROM_DEPTH,
  parameter int unsigned CARRIER_DIV_P = CARRIER_DIV,
  localparam int unsigned SW = $clog2(SAMPLE_DIV_P),
  localparam int unsigned AW = $clog2(ROM_DEPTH_P),
  localparam int unsigned PW = $clog2(CARRIER_DIV_P),
  localparam int unsigned CW = $clog2(CARRIER_STEP+1)
) (
  input  logic                  clk,
  input  logic                  clr,
  output all_gates_t            gates,
  output logic [N_CARRIERS-1:0] pulse,
  output code_t                 modulating,
  output logic [CW-1:0]         carrier,
  output logic [AW-1:0]         sample_addr
);

  logic [SW-1:0] sample_count;
  logic          sample_tick;
  logic          sample_wrap;
  logic [PW-1:0] carrier_phase;
  logic          carrier_rising;

  sample_timer #(.DIV(SAMPLE_DIV_P)) u_sample_timer (
    .clk, .clr, .count(sample_count), .tick(sample_tick)
  );

  rom_address_counter #(.DEPTH(ROM_DEPTH_P)) u_addr (
    .clk, .clr, .advance(sample_tick), .addr(sample_addr), .wrap(sample_wrap)
  );

  sine_rom #(.DEPTH(ROM_DEPTH_P)) u_rom (
    .clk, .clr, .rd_en(1'b1), .addr(sample_addr), .data(modulating)
  );

  carrier_timer #(.DIV(CARRIER_DIV_P)) u_carrier_timer (
    .clk, .clr, .count(carrier_phase)
  );

  triangle_gen #(.HALF(CARRIER_DIV_P / 2), .PEAK(CARRIER_STEP)) u_triangle (
    .clk, .clr, .phase(carrier_phase), .carrier, .rising(carrier_rising)
  );

  carrier_comparator_bank u_compare (
    .clk, .clr, .modulating, .carrier, .pulse
  );

  hbridge_switch_logic u_switch (
    .clk, .clr, .pulse, .gates
  );

endmodule
