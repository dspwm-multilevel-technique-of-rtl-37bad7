// sine_rom_tb: reads all 500 locations and compares each with
// 4550 + 4550*sin(2*pi*i/500) computed here with the simulator's $sin, allowing
// one code of rounding difference. Also checks the one-clock read latency,
// the extremes (0 at location 375, 9100 at location 125), the symmetry
// v[i] + v[i+250] = 9100, and that data is 0 when a clock passes without a read
// and during clear.
module sine_rom_tb;
  localparam int unsigned DEPTH = 500, DW = 14;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, clr = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] data;
  int checks = 0, failures = 0;
  int vals [DEPTH];

  sine_rom #(.DEPTH(DEPTH)) dut (.clk, .clr, .rd_en, .addr, .data);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    int e, diff;
    @(posedge clk);
    #1;
    for (int i = 0; i < int'(DEPTH); i++) begin
      addr = AW'(i);
      rd_en = 1'b1;
      @(posedge clk);
      #1;
      // next address presented immediately: data must still reflect location i
      addr = AW'((i + 7) % DEPTH);
      rd_en = 1'b0;
      r = 4550.0 + 4550.0 * $sin(2.0 * PI * real'(i) / real'(DEPTH));
      e = $rtoi(r + 0.5);
      diff = int'(data) - e;
      vals[i] = int'(data);
      checks++;
      if (diff > 1 || diff < -1) begin
        failures++;
        if (failures < 10) $display("loc %0d: data=%0d expected %0d", i, data, e);
      end
      @(posedge clk);
      #1;
      checks++;
      if (data != '0) begin failures++; $display("data not 0 without read"); end
    end
    checks += 2;
    if (vals[125] != 9100) begin failures++; $display("peak %0d", vals[125]); end
    if (vals[375] != 0)    begin failures++; $display("trough %0d", vals[375]); end
    for (int i = 1; i < 250; i++) begin
      checks++;
      if (vals[i] + vals[i + 250] != 9100) begin
        failures++;
        if (failures < 20) $display("symmetry %0d: %0d + %0d", i, vals[i], vals[i+250]);
      end
    end
    // a read followed by clear: data returns to 0 without a clock edge
    addr = AW'(125);
    rd_en = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (data != DW'(9100)) begin failures++; $display("peak read %0d", data); end
    #2 clr = 1'b1;
    #1;
    checks++;
    if (data != '0) begin failures++; $display("data %0d during clear", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
