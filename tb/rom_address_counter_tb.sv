// rom_address_counter_tb: drives `advance` with a random pattern and checks the
// location index against a testbench model: it steps only on advance, wraps
// from 499 to 0 and flags the wrap. Also checks that holding advance low holds
// the address.
module rom_address_counter_tb;
  localparam int unsigned DEPTH = 500;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0, clr = 1'b1, advance = 1'b0;
  logic [AW-1:0] addr;
  logic wrap;
  int checks = 0, failures = 0;

  rom_address_counter #(.DEPTH(DEPTH)) dut (.clk, .clr, .advance, .addr, .wrap);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_addr, wraps;
    exp_addr = 0; wraps = 0;
    repeat (3) @(posedge clk);
    #1 clr = 1'b0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      advance = (cyc < 1200) ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (cyc >= 3000 && cyc < 3100) advance = 1'b0;
      #1;
      checks++;
      if (addr != AW'(exp_addr) || wrap != (advance && exp_addr == int'(DEPTH) - 1)) begin
        failures++;
        if (failures < 10) $display("cyc %0d: addr=%0d wrap=%0b expected %0d", cyc, addr, wrap, exp_addr);
      end
      if (wrap) wraps++;
      @(posedge clk);
      if (advance) exp_addr = (exp_addr == int'(DEPTH) - 1) ? 0 : exp_addr + 1;
      #1;
    end
    checks++;
    if (wraps < 3) begin failures++; $display("only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
