// sine_rom: sine look-up table of the DDFS, 2^AW words x 8 bits.
//
// Word i holds round(128 + 127 * sin(2*pi*i / 2^AW)), an offset-binary
// sample for an 8-bit DAC (values 1..255, mid-scale 128). The table is
// computed when the memory is initialised, so no data file is needed. The
// 8-bit width follows the design's DAC; the 2^13-word depth is this
// design's reading of the stated ROM size, and the full-wave (not
// quarter-wave) layout and the rounding are its own choices.
//
// Interface: clk, addr in; data out. Timing: synchronous read, data is
// valid one clock after addr (a block-RAM style ROM).
module sine_rom #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [DW-1:0] mem [DEPTH];

  // sin(2*pi*i/DEPTH) in Q30 fixed point: fold into the first quadrant,
  // then a Taylor series to x^11 (error below 1e-8, far under one LSB).
  localparam longint ONE = 64'sd1 << 30;
  localparam longint HALF_PI = 64'sd1686629713;   // pi/2 in Q30
  localparam longint QUARTER = longint'(DEPTH) / 4;

  function automatic longint sin_q30(int unsigned i);
    int unsigned q, r;
    longint x, x2, term, acc;
    q = i / (DEPTH / 4);                    // quadrant
    r = i % (DEPTH / 4);                    // position in quadrant
    if (q == 1 || q == 3) r = DEPTH / 4 - r;
    x    = (HALF_PI * longint'(r)) / QUARTER;
    x2   = (x * x) >>> 30;
    term = x;
    acc  = x;
    for (int k = 1; k <= 5; k++) begin
      term = -((term * x2) >>> 30) / longint'((2 * k) * (2 * k + 1));
      acc += term;
    end
    return (q >= 2) ? -acc : acc;
  endfunction

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      longint v;
      // round(2^(DW-1) + (2^(DW-1) - 1) * sin), computed in Q30
      v = (longint'(1) << (DW - 1 + 30)) +
          longint'((1 << (DW - 1)) - 1) * sin_q30(i) + (ONE >>> 1);
      mem[i] = DW'(v >>> 30);
    end
  end

  always_ff @(posedge clk)
    data <= mem[addr];

endmodule
