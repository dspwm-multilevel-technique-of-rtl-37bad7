// dspwm27_top_tb: end-to-end test of the 27-level controller at its default
// size (50 MHz clock, 500 samples of 1667 clocks, 3000-clock carrier). It runs
// two full 60 Hz periods of the reference plus a margin, and on every clock:
//   - checks the ROM location against a testbench counter (1667 clocks per
//     location, 500 locations) and the reference against
//     round(4550 + 4550*sin(2*pi*i/500)) computed here with $sin;
//   - checks the main carrier against the closed-form staircase triangle;
//   - checks the 26 pulses against the comparisons of the previous clock's
//     reference and carrier (carrier k = triangle + 350*(k-1));
//   - rebuilds the converter output, V = 9*d1 + 3*d2 + d3 (in units of the
//     12 V source), from the 12 gates and checks it equals the number of
//     active pulses of the previous clock minus 13, with legal bridge states;
//   - checks that the output level averaged over each carrier period (3000
//     clocks) follows the reference, (ref - 4550) / 350, within half a level.
// It runs two reference periods, measures the period between ROM wrap-arounds
// (must be 833,500 clocks: 59.99 Hz) and
// counts how often each mechanism happens: each of the 27 levels, each state
// of each bridge, ROM wrap-around, carrier peaks and troughs. A mechanism that
// never happens is a failure.
module dspwm27_top_tb;
  import dspwm_pkg::*;
  localparam int unsigned CW = $clog2(CARRIER_STEP+1);
  localparam int unsigned AW = $clog2(ROM_DEPTH);
  localparam real PI = 3.14159265358979323846;
  localparam int HALF = int'(CARRIER_DIV) / 2;
  localparam int SINE_PERIOD = int'(SAMPLE_DIV) * int'(ROM_DEPTH);

  logic clk = 1'b0, clr = 1'b1;
  all_gates_t gates;
  logic [N_CARRIERS-1:0] pulse;
  code_t modulating;
  logic [CW-1:0] carrier;
  logic [AW-1:0] sample_addr;

  dspwm27_top dut (.clk, .clr, .gates, .pulse, .modulating, .carrier, .sample_addr);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  int level_seen [N_LEVELS];
  int state_seen [N_BRIDGES][3];
  int rom_wraps = 0, carrier_peaks = 0, carrier_troughs = 0;

  initial begin : watchdog
    repeat (2 * SINE_PERIOD + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sine_code(int i);
    real r;
    r = 4550.0 + 4550.0 * $sin(2.0 * PI * real'(i) / real'(ROM_DEPTH));
    return $rtoi(r + 0.5);
  endfunction

  function automatic int digit(bridge_gates_t g);
    case (bridge_state(g))
      BR_POS:  return 1;
      BR_NEG:  return -1;
      BR_ZERO: return 0;
      default: return 99;
    endcase
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  initial begin
    int edges, exp_addr, prev_addr, n, exp_car, v, d, ones_prev, prev_mod, prev_car;
    int first_wrap, second_wrap, last_wrap_edge;
    int lvl_sum, lvl_cnt, ref_sum, ref_d2;
    real max_dev;
    real mean, target;
    logic [N_CARRIERS-1:0] exp_pulse;

    foreach (level_seen[i]) level_seen[i] = 0;
    foreach (state_seen[b, s]) state_seen[b][s] = 0;
    first_wrap = -1; second_wrap = -1;
    lvl_sum = 0; lvl_cnt = 0; ref_sum = 0; ref_d2 = 4550; max_dev = 0.0;

    repeat (3) @(posedge clk);
    #1 clr = 1'b0;
    edges = 0;
    prev_addr = 0; prev_mod = 0; prev_car = 0; ones_prev = 0;
    last_wrap_edge = -1;

    for (int cyc = 0; cyc < 2 * SINE_PERIOD + 5000; cyc++) begin
      @(posedge clk);
      edges++;
      #1;
      // ---- sample pacing and ROM location ----
      // the location advances on the edges where the sample count was 0:
      // edges 1, 1+1667, 1+2*1667, ... (count 0 is seen on the first edge)
      exp_addr = ((edges - 1) / int'(SAMPLE_DIV) + 1) % int'(ROM_DEPTH);
      checks++;
      if (int'(sample_addr) != exp_addr) fail($sformatf("edge %0d addr %0d expected %0d", edges, sample_addr, exp_addr));
      if (sample_addr == '0 && prev_addr == int'(ROM_DEPTH) - 1) begin
        rom_wraps++;
        if (first_wrap < 0) first_wrap = edges;
        else if (second_wrap < 0) second_wrap = edges;
      end
      // ---- reference: value of the location held before this edge ----
      if (edges >= 2) begin
        checks++;
        if (int'(modulating) != sine_code(prev_addr))
          fail($sformatf("edge %0d ref %0d expected %0d (loc %0d)", edges, modulating, sine_code(prev_addr), prev_addr));
      end
      // ---- main carrier ----
      n = edges % (2 * HALF);
      exp_car = (n <= HALF) ? (n * int'(CARRIER_STEP)) / HALF
                            : int'(CARRIER_STEP) - ((n - HALF) * int'(CARRIER_STEP)) / HALF;
      checks++;
      if (int'(carrier) != exp_car) fail($sformatf("edge %0d carrier %0d expected %0d", edges, carrier, exp_car));
      if (n == HALF && int'(carrier) == int'(CARRIER_STEP)) carrier_peaks++;
      if (n == 0 && carrier == '0) carrier_troughs++;
      // ---- comparators: previous clock's reference and carrier ----
      if (edges >= 3) begin
        for (int k = 0; k < int'(N_CARRIERS); k++)
          exp_pulse[k] = (prev_mod > prev_car + k * int'(CARRIER_STEP));
        checks++;
        if (pulse != exp_pulse) fail($sformatf("edge %0d pulse %b expected %b", edges, pulse, exp_pulse));
      end
      // ---- gates: converter level from the previous clock's pulses ----
      if (edges >= 4) begin
        v = 0;
        for (int b = 0; b < int'(N_BRIDGES); b++) begin
          d = digit(gates[b]);
          checks++;
          if (d == 99) fail($sformatf("edge %0d bridge %0d illegal gates %b", edges, b + 1, gates[b]));
          else state_seen[b][d + 1]++;
          v = v * 3 + d;
        end
        checks++;
        if (v != ones_prev - 13) fail($sformatf("edge %0d level %0d expected %0d", edges, v, ones_prev - 13));
        if (v >= -13 && v <= 13) level_seen[v + 13]++;
        // ---- average level over each carrier period follows the reference ----
        // (the level of this clock comes from the reference two clocks back)
        lvl_sum += v;
        ref_sum += ref_d2 - 4550;
        lvl_cnt++;
        if (lvl_cnt == 2 * HALF) begin
          mean = real'(lvl_sum) / real'(lvl_cnt);
          target = real'(ref_sum) / real'(lvl_cnt) / 350.0;
          checks++;
          if (mean - target > 0.5 || target - mean > 0.5)
            fail($sformatf("edge %0d mean level %f target %f", edges, mean, target));
          if (mean - target > max_dev) max_dev = mean - target;
          if (target - mean > max_dev) max_dev = target - mean;
          lvl_sum = 0;
          ref_sum = 0;
          lvl_cnt = 0;
        end
      end
      ref_d2 = prev_mod;
      ones_prev = $countones(pulse);
      prev_mod = int'(modulating);
      prev_car = int'(carrier);
      prev_addr = int'(sample_addr);
    end

    // ---- reference frequency ----
    checks++;
    if (rom_wraps < 1) fail("ROM never wrapped");
    $display("reference period: %0d clocks (%0d samples of %0d clocks)", SINE_PERIOD, ROM_DEPTH, SAMPLE_DIV);
    checks += 2;
    if (first_wrap != 1 + (int'(ROM_DEPTH) - 1) * int'(SAMPLE_DIV))
      fail($sformatf("first wrap at edge %0d expected %0d", first_wrap, 1 + (int'(ROM_DEPTH) - 1) * int'(SAMPLE_DIV)));
    if (second_wrap - first_wrap != SINE_PERIOD)
      fail($sformatf("measured reference period %0d clocks, expected %0d", second_wrap - first_wrap, SINE_PERIOD));
    else
      $display("measured reference period %0d clocks = %f Hz at 50 MHz", second_wrap - first_wrap,
               real'(CLK_HZ) / real'(second_wrap - first_wrap));
    $display("largest deviation of the carrier-period mean level from the reference: %f levels", max_dev);
    // ---- coverage of mechanisms ----
    for (int i = 0; i < int'(N_LEVELS); i++) begin
      checks++;
      if (level_seen[i] == 0) fail($sformatf("level %0d never produced", i - 13));
    end
    for (int b = 0; b < int'(N_BRIDGES); b++)
      for (int s = 0; s < 3; s++) begin
        checks++;
        if (state_seen[b][s] == 0) fail($sformatf("bridge %0d state %0d never produced", b + 1, s - 1));
      end
    checks += 2;
    if (carrier_peaks == 0) fail("carrier peak never reached");
    if (carrier_troughs == 0) fail("carrier trough never reached");
    $display("mechanisms: rom_wraps=%0d carrier_peaks=%0d carrier_troughs=%0d level+13=%0d level-13=%0d level0=%0d",
             rom_wraps, carrier_peaks, carrier_troughs, level_seen[26], level_seen[0], level_seen[13]);
    $display("bridge1 -/0/+ %0d/%0d/%0d  bridge2 %0d/%0d/%0d  bridge3 %0d/%0d/%0d",
             state_seen[0][0], state_seen[0][1], state_seen[0][2], state_seen[1][0], state_seen[1][1],
             state_seen[1][2], state_seen[2][0], state_seen[2][1], state_seen[2][2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
