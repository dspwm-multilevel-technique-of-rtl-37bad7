// carrier_timer_tb: checks the carrier timer counts 0..2999 and wraps, so that
// one carrier period is exactly 3000 clocks (16.67 kHz at 50 MHz).
module carrier_timer_tb;
  localparam int unsigned DIV = 3000;
  localparam int unsigned W   = $clog2(DIV);

  logic clk = 1'b0, clr = 1'b1;
  logic [W-1:0] count;
  int checks = 0, failures = 0;

  carrier_timer #(.DIV(DIV)) dut (.clk, .clr, .count);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_count, zeros, last_zero;
    exp_count = 0; zeros = 0; last_zero = -1;
    repeat (2) @(posedge clk);
    #1 clr = 1'b0;
    for (int cyc = 0; cyc < 4 * int'(DIV) + 11; cyc++) begin
      #1;
      checks++;
      if (count != W'(exp_count)) begin
        failures++;
        if (failures < 10) $display("cyc %0d: count=%0d expected %0d", cyc, count, exp_count);
      end
      if (count == '0) begin
        if (last_zero >= 0) begin
          checks++;
          if (cyc - last_zero != int'(DIV)) begin failures++; $display("period %0d", cyc - last_zero); end
        end
        last_zero = cyc;
        zeros++;
      end
      @(posedge clk);
      exp_count = (exp_count == int'(DIV) - 1) ? 0 : exp_count + 1;
    end
    checks++;
    if (zeros != 5) begin failures++; $display("zeros=%0d", zeros); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
