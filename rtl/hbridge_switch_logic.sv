// hbridge_switch_logic: from 26 PWM pulse trains to 12 IGBT gate signals.
//
// The converter output is V = (9*d1 + 3*d2 + d3) * Vdc with each bridge digit
// d in {-1, 0, +1}: the 27 levels -13..+13 are the balanced-ternary numbers of
// three digits. The comparator bank gives a thermometer code whose number of
// ones c (0..26) is the level plus 13. This block decodes c into the three
// digits with the sum-of-products equations of the reference design, one
// group per bridge:
//   bridge 1 (9*Vdc): S11 = p18, S13 = NOT p9
//   bridge 2 (3*Vdc): S21 = p24 + /p18.p15 + p9./p6
//                     S23 = p21 + /p18./p12 + p9./p3
//   bridge 3 (Vdc):   S31 = p26 + /p24.p23 + /p21.p20 + /p18.p17 + /p15.p14
//                           + p12./p11 + p9./p8 + p6./p5 + p3./p2
//                     S33 = p25 + /p24.p22 + /p21.p19 + /p18.p16 + /p15./p13
//                           + p12./p10 + p9./p7 + p6./p4 + p3./p1
//   and S12 = /S11, S14 = /S13 (same for bridges 2 and 3).
// In these equations the pulse p_k is the comparator output for the upper
// carriers (k = 14..26) and its complement for the lower carriers (k = 1..13),
// i.e. the lower pulses are active while the reference is below the carrier.
// With that reading every equation matches the switching table: a bridge gives
// +Vdc with S1,S3 on, -Vdc with S2,S4 on and 0 V with S2,S3 on.
//
// Interface: clk, clr (asynchronous, active high; all gates then off), pulse
// (bit k-1 high when the reference is above carrier k), gates (one
// bridge_gates_t per bridge, index 0 = bridge 1).
// Timing: gates are registered, one clock after pulse.
// The equations follow the reference design; the output register and the
// all-off reset state are this design's own (no dead time is inserted: the
// reference design does not describe one).
module hbridge_switch_logic
  import dspwm_pkg::*;
(
  input  logic                  clk,
  input  logic                  clr,
  input  logic [N_CARRIERS-1:0] pulse,
  output all_gates_t            gates
);

  // p[k] for k = 1..26 in the numbering of the equations.
  logic [N_CARRIERS:1] p;
  always_comb begin
    for (int k = 1; k <= int'(N_CARRIERS); k++)
      p[k] = (k <= int'(N_CARRIERS / 2)) ? ~pulse[k-1] : pulse[k-1];
  end

  logic s11, s13, s21, s23, s31, s33;
  all_gates_t gates_d;

  always_comb begin
    s11 = p[18];
    s13 = ~p[9];
    s21 = p[24] | (~p[18] & p[15]) | (p[9] & ~p[6]);
    s23 = p[21] | (~p[18] & ~p[12]) | (p[9] & ~p[3]);
    s31 = p[26] | (~p[24] & p[23]) | (~p[21] & p[20]) | (~p[18] & p[17])
        | (~p[15] & p[14]) | (p[12] & ~p[11]) | (p[9] & ~p[8])
        | (p[6] & ~p[5]) | (p[3] & ~p[2]);
    s33 = p[25] | (~p[24] & p[22]) | (~p[21] & p[19]) | (~p[18] & p[16])
        | (~p[15] & ~p[13]) | (p[12] & ~p[10]) | (p[9] & ~p[7])
        | (p[6] & ~p[4]) | (p[3] & ~p[1]);

    gates_d[0] = '{s1: s11, s2: ~s11, s3: s13, s4: ~s13};
    gates_d[1] = '{s1: s21, s2: ~s21, s3: s23, s4: ~s23};
    gates_d[2] = '{s1: s31, s2: ~s31, s3: s33, s4: ~s33};
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) gates <= '0;
    else     gates <= gates_d;
  end

  // Outside reset, no leg of any bridge may have both switches on or both off.
  for (genvar b = 0; b < int'(N_BRIDGES); b++) begin : g_legs
    a_leg_a: assert property (@(posedge clk) disable iff (clr)
                              $past(!clr) |-> (gates[b].s1 ^ gates[b].s2));
    a_leg_b: assert property (@(posedge clk) disable iff (clr)
                              $past(!clr) |-> (gates[b].s3 ^ gates[b].s4));
  end

endmodule
