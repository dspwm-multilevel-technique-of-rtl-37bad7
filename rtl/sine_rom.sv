// sine_rom: one period of the sinusoidal modulating signal.
//
// DEPTH locations (500 in the reference design), location i holding
//   round(OFFSET + AMPL * sin(2*pi*i/DEPTH)).
// With OFFSET = AMPL = 4550 the reference spans 0..9100 codes, the same
// peak-to-peak range as the stack of 26 carriers (26 * 350 codes), i.e. full
// modulation depth. The table is computed at elaboration by a constant
// function (a 17th-order Taylor series after folding the angle into
// [0, pi/2]), so no data file is needed.
//
// Reading: when rd_en is high at a clock edge the location addr is read; the
// value appears on data from that edge on. When rd_en was low, and from clr
// until the first read, data is 0 (the reference design releases its data bus
// in those cases; a two-state bus is used here). Addresses DEPTH and above
// read as OFFSET (the zero of the sine).
//
// Interface: clk, clr (asynchronous, active high), rd_en, addr, data.
// Timing: one clock of read latency.
// Depth follows the reference design; its exact stored values, the data
// width, the full-scale amplitude and the registered read are this design's
// own choices.
module sine_rom #(
  parameter int unsigned DEPTH  = dspwm_pkg::ROM_DEPTH,
  parameter int unsigned DW     = dspwm_pkg::CODE_W,
  parameter int unsigned OFFSET = dspwm_pkg::N_CARRIERS * dspwm_pkg::CARRIER_STEP / 2,
  parameter int unsigned AMPL   = dspwm_pkg::N_CARRIERS * dspwm_pkg::CARRIER_STEP / 2,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          rd_en,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  typedef logic [DW-1:0] table_t [DEPTH];

  localparam real PI = 3.14159265358979323846;

  // sin(x) for 0 <= x < 2*pi.
  function automatic real sin_fold(real x);
    real y, term, sum, sign;
    sign = 1.0;
    y    = x;
    if (y >= PI) begin
      y    = y - PI;
      sign = -1.0;
    end
    if (y > PI / 2.0) y = PI - y;
    term = y;
    sum  = y;
    for (int k = 1; k <= 8; k++) begin
      term = -term * y * y / ((2.0 * k) * (2.0 * k + 1.0));
      sum  = sum + term;
    end
    return sign * sum;
  endfunction

  function automatic table_t make_table();
    table_t t;
    real    v;
    for (int i = 0; i < int'(DEPTH); i++) begin
      v = real'(OFFSET) + real'(AMPL) * sin_fold(2.0 * PI * real'(i) / real'(DEPTH));
      if (v < 0.0) v = 0.0;
      t[i] = DW'($rtoi(v + 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  logic [DW-1:0] rom_q;
  logic          rd_q;

  // table word: no reset, so it can map onto a block RAM
  always_ff @(posedge clk) begin
    if (rd_en) rom_q <= (addr < AW'(DEPTH)) ? TABLE[addr] : DW'(OFFSET);
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) rd_q <= 1'b0;
    else     rd_q <= rd_en;
  end

  assign data = rd_q ? rom_q : '0;

endmodule
