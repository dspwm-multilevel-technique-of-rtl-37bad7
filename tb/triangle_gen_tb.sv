// triangle_gen_tb: drives the phase input like the carrier timer does
// (0..2*HALF-1) and checks the carrier after every clock against the closed
// form of an evenly spread staircase:
//   n clocks into the rising half : floor(n * PEAK / HALF)
//   m clocks into the falling half: PEAK - floor(m * PEAK / HALF)
// It also checks the peak (350) and the period (3000 clocks), and runs a
// second, small instance with PEAK == HALF, where the carrier must move by one
// on every clock (a plain up/down counter).
module triangle_gen_tb;
  localparam int unsigned HALF = 1500, PEAK = 350;
  localparam int unsigned PW = $clog2(2*HALF), CW = $clog2(PEAK+1);
  localparam int unsigned H2 = 8;
  localparam int unsigned PW2 = $clog2(2*H2), CW2 = $clog2(H2+1);

  logic clk = 1'b0, clr = 1'b1;
  logic [PW-1:0] phase;
  logic [CW-1:0] carrier;
  logic rising;
  logic [PW2-1:0] phase2;
  logic [CW2-1:0] carrier2;
  logic rising2;
  int checks = 0, failures = 0;

  triangle_gen #(.HALF(HALF), .PEAK(PEAK)) dut (.clk, .clr, .phase, .carrier, .rising);
  triangle_gen #(.HALF(H2), .PEAK(H2)) dut2 (.clk, .clr, .phase(phase2), .carrier(carrier2), .rising(rising2));

  always #10 clk = ~clk;

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      phase  <= '0;
      phase2 <= '0;
    end else begin
      phase  <= (phase == PW'(2*HALF-1)) ? '0 : phase + 1'b1;
      phase2 <= (phase2 == PW2'(2*H2-1)) ? '0 : phase2 + 1'b1;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges, n, exp, exp2, maxc, peaks;
    edges = 0; maxc = 0; peaks = 0;
    repeat (2) @(posedge clk);
    #1 clr = 1'b0;
    for (int cyc = 0; cyc < 3 * 2 * int'(HALF) + 5; cyc++) begin
      @(posedge clk);
      edges++;
      #1;
      n = edges % (2 * int'(HALF));
      exp = (n <= int'(HALF)) ? (n * int'(PEAK)) / int'(HALF)
                              : int'(PEAK) - ((n - int'(HALF)) * int'(PEAK)) / int'(HALF);
      checks++;
      if (carrier != CW'(exp)) begin
        failures++;
        if (failures < 10) $display("edge %0d: carrier=%0d expected %0d", edges, carrier, exp);
      end
      if (int'(carrier) > maxc) maxc = int'(carrier);
      if (n == int'(HALF) && carrier == CW'(PEAK)) peaks++;
      n = edges % (2 * int'(H2));
      exp2 = (n <= int'(H2)) ? n : 2 * int'(H2) - n;
      checks++;
      if (carrier2 != CW2'(exp2)) begin
        failures++;
        if (failures < 20) $display("edge %0d: carrier2=%0d expected %0d", edges, carrier2, exp2);
      end
    end
    checks += 2;
    if (maxc != int'(PEAK)) begin failures++; $display("max carrier %0d", maxc); end
    if (peaks != 3) begin failures++; $display("peaks %0d", peaks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
