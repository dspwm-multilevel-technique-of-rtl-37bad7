// dspwm_pkg: constants and types shared by the 27-level digital sinusoidal
// PWM (DSPWM) controller.
//
// The controller compares one sinusoidal reference with 26 level-shifted
// triangular carriers (phase disposition) and turns the 26 comparison results
// into the 12 gate signals of three cascaded H-bridges whose DC sources are in
// the ratio 9:3:1. The numbers below are the ones of the reference design: a
// 50 MHz clock, a 500-sample sine table stepped every 1667 clocks (60 Hz), a
// 3000-clock carrier period and a carrier level spacing of 350 codes, so that
// the carrier stack spans 0..9100 codes, the same peak-to-peak range as the
// sine reference. The 14-bit code width is this design's own choice: it is the
// narrowest width that holds 9100.
package dspwm_pkg;

  localparam int unsigned CLK_HZ        = 50_000_000; // system clock
  localparam int unsigned N_LEVELS      = 27;         // output levels -13..+13
  localparam int unsigned N_CARRIERS    = N_LEVELS - 1;
  localparam int unsigned N_BRIDGES     = 3;

  localparam int unsigned SAMPLE_DIV    = 1667;       // clocks per ROM sample (count 0..1666)
  localparam int unsigned ROM_DEPTH     = 500;        // samples per sine period
  localparam int unsigned CARRIER_DIV   = 3000;       // clocks per carrier period (count 0..2999)
  localparam int unsigned CARRIER_STEP  = 350;        // carrier peak and level spacing, codes

  localparam int unsigned CODE_W        = 14;         // reference / carrier code width
  typedef logic [CODE_W-1:0] code_t;

  // Gate signals of one H-bridge. s1/s3 on gives +Vdc, s2/s4 on gives -Vdc,
  // s2/s3 on gives 0 V (the zero state used by this design).
  typedef struct packed {
    logic s1;
    logic s2;
    logic s3;
    logic s4;
  } bridge_gates_t;

  // Bridge 1 carries the 9*Vdc source, bridge 2 the 3*Vdc one, bridge 3 Vdc.
  typedef bridge_gates_t [N_BRIDGES-1:0] all_gates_t;  // index 0 = bridge 1

  // Voltage state of one bridge (a balanced-ternary digit of the level).
  typedef enum logic [1:0] {
    BR_ZERO  = 2'b00,
    BR_POS   = 2'b01,
    BR_NEG   = 2'b10,
    BR_SHORT = 2'b11   // illegal: both legs conducting / undefined
  } bridge_state_t;

  // Decode the voltage state a bridge is driven to by its gate signals.
  function automatic bridge_state_t bridge_state(bridge_gates_t g);
    if (g.s1 && g.s3 && !g.s2 && !g.s4)      return BR_POS;
    else if (g.s2 && g.s4 && !g.s1 && !g.s3) return BR_NEG;
    else if (g.s2 && g.s3 && !g.s1 && !g.s4) return BR_ZERO;
    else if (g.s1 && g.s4 && !g.s2 && !g.s3) return BR_ZERO;
    else                                     return BR_SHORT;
  endfunction

endpackage
