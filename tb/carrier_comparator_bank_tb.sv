// carrier_comparator_bank_tb: applies reference and carrier values (random,
// plus the corner cases reference == carrier k, 0 and full scale) and checks
// all 26 pulses one clock later against reference > carrier + 350*(k-1)
// evaluated here. Also counts that every number of active pulses 0..26 was seen.
module carrier_comparator_bank_tb;
  import dspwm_pkg::*;
  localparam int unsigned CW = $clog2(CARRIER_STEP+1);

  logic clk = 1'b0, clr = 1'b1;
  code_t modulating = '0;
  logic [CW-1:0] carrier = '0;
  logic [N_CARRIERS-1:0] pulse;
  int checks = 0, failures = 0;
  int seen [N_CARRIERS+1];

  carrier_comparator_bank dut (.clk, .clr, .modulating, .carrier, .pulse);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, c, ones;
    logic [N_CARRIERS-1:0] exp;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(posedge clk);
    #1 clr = 1'b0;
    for (int t = 0; t < 20000; t++) begin
      c = $urandom_range(0, CARRIER_STEP);
      case (t % 4)
        0: m = $urandom_range(0, N_CARRIERS * CARRIER_STEP);
        1: m = c + CARRIER_STEP * $urandom_range(0, N_CARRIERS - 1);  // tie with a carrier
        2: m = c + CARRIER_STEP * $urandom_range(0, N_CARRIERS - 1) + 1;
        default: m = (t % 8 == 3) ? 0 : N_CARRIERS * CARRIER_STEP;
      endcase
      modulating = CODE_W'(m);
      carrier = CW'(c);
      for (int k = 0; k < int'(N_CARRIERS); k++) exp[k] = (m > c + k * int'(CARRIER_STEP));
      @(posedge clk);
      #1;
      checks++;
      if (pulse != exp) begin
        failures++;
        if (failures < 10) $display("m=%0d c=%0d pulse=%b expected %b", m, c, pulse, exp);
      end
      ones = $countones(pulse);
      seen[ones]++;
    end
    for (int i = 0; i <= int'(N_CARRIERS); i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("count %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
