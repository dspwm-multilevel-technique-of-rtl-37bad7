// hbridge_switch_logic_tb: for every thermometer input with c = 0..26 active
// pulses the converter must produce level L = c - 13. The testbench splits L
// into balanced-ternary digits (d1, d2, d3) with 9*d1 + 3*d2 + d3 = L and
// expects, per bridge, S1,S3 on for +1, S2,S4 on for -1 and S2,S3 on for 0.
// It checks the 12 gates one clock after the input, checks the output voltage
// rebuilt from the gates, walks the levels up and down several times, and
// checks that clear turns all gates off.
module hbridge_switch_logic_tb;
  import dspwm_pkg::*;

  logic clk = 1'b0, clr = 1'b1;
  logic [N_CARRIERS-1:0] pulse = '0;
  all_gates_t gates;
  int checks = 0, failures = 0;

  hbridge_switch_logic dut (.clk, .clr, .pulse, .gates);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bridge_gates_t expect_gates(int d);
    if (d > 0)      return '{s1: 1'b1, s2: 1'b0, s3: 1'b1, s4: 1'b0};
    else if (d < 0) return '{s1: 1'b0, s2: 1'b1, s3: 1'b0, s4: 1'b1};
    else            return '{s1: 1'b0, s2: 1'b1, s3: 1'b1, s4: 1'b0};
  endfunction

  function automatic int gate_digit(bridge_gates_t g);
    case (bridge_state(g))
      BR_POS:  return 1;
      BR_NEG:  return -1;
      BR_ZERO: return 0;
      default: return 99;
    endcase
  endfunction

  task automatic apply_and_check(int c);
    int lvl, d1, d2, d3, v;
    lvl = c - 13;
    d1 = 99; d2 = 99; d3 = 99;
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        for (int e = -1; e <= 1; e++)
          if (9 * a + 3 * b + e == lvl) begin d1 = a; d2 = b; d3 = e; end
    pulse = '0;
    for (int k = 0; k < c; k++) pulse[k] = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (gates[0] != expect_gates(d1) || gates[1] != expect_gates(d2) || gates[2] != expect_gates(d3)) begin
      failures++;
      if (failures < 10) $display("c=%0d level %0d: gates %b expected digits %0d %0d %0d", c, lvl, gates, d1, d2, d3);
    end
    v = 9 * gate_digit(gates[0]) + 3 * gate_digit(gates[1]) + gate_digit(gates[2]);
    checks++;
    if (v != lvl) begin failures++; if (failures < 10) $display("c=%0d output %0d expected %0d", c, v, lvl); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (gates != '0) begin failures++; $display("gates not off in clear"); end
    clr = 1'b0;
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c <= 26; c++) apply_and_check(c);
      for (int c = 26; c >= 0; c--) apply_and_check(c);
    end
    for (int t = 0; t < 200; t++) apply_and_check($urandom_range(0, 26));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
