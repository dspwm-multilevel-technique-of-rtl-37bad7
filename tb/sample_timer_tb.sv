// sample_timer_tb: checks the sample timer at its default size (1667 clocks).
// A reference counter kept in the testbench predicts count and tick every
// clock; the spacing of ticks is measured and must be exactly 1667 clocks, the
// rate that gives 500 samples per 60 Hz period at 50 MHz.
module sample_timer_tb;
  localparam int unsigned DIV = 1667;
  localparam int unsigned W   = $clog2(DIV);

  logic clk = 1'b0, clr = 1'b1;
  logic [W-1:0] count;
  logic tick;
  int checks = 0, failures = 0;

  sample_timer #(.DIV(DIV)) dut (.clk, .clr, .count, .tick);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_count;
    int last_tick, ticks;
    exp_count = 0; last_tick = -1; ticks = 0;
    repeat (3) @(posedge clk);
    #1 clr = 1'b0;
    for (int cyc = 0; cyc < 5 * int'(DIV) + 7; cyc++) begin
      #1;
      checks++;
      if (count != W'(exp_count) || tick != (exp_count == 0)) begin
        failures++;
        if (failures < 10) $display("cyc %0d: count=%0d tick=%0b expected %0d", cyc, count, tick, exp_count);
      end
      if (tick) begin
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != int'(DIV)) begin
            failures++;
            $display("tick spacing %0d, expected %0d", cyc - last_tick, DIV);
          end
        end
        last_tick = cyc;
        ticks++;
      end
      @(posedge clk);
      exp_count = (exp_count == int'(DIV) - 1) ? 0 : exp_count + 1;
    end
    checks++;
    if (ticks != 6) begin failures++; $display("ticks=%0d expected 6", ticks); end
    // asynchronous clear returns the count to zero without a clock edge
    #3 clr = 1'b1;
    #1 checks++;
    if (count != '0) begin failures++; $display("clear did not reset count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
