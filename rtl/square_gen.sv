// square_gen: phase-accumulator square-wave and tick generator.
//
// An n-bit accumulator adds the frequency code `code` on every clock. Its
// most significant bit is a square wave of frequency F_CLK * code / 2^n,
// and the carry out of the addition, registered, is a one-clock tick once
// per period. With F_CLK = 50 MHz and n = 32, code 344 gives the 4 Hz data
// wave, 86 the 1 Hz slow hop clock and 1374 the 16 Hz fast hop clock, as in
// the design's frequency plan; that these low-rate clocks are built as
// accumulators (rather than as plain counters) follows the design's own
// equations for them.
//
// Interface: clk, asynchronous active-low rst_n (clears the accumulator,
// so every generator in the design starts in phase), code input, wave and
// tick outputs. Timing: wave is bit n-1 of the accumulator register; tick
// is high for the one cycle after the accumulator wrapped, i.e. it rises
// in the same cycle as wave falls. The first tick comes one full period
// after reset.
module square_gen #(
  parameter int unsigned N = 32   // accumulator width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] code,
  output logic         wave,
  output logic         tick
);

  logic [N-1:0] acc;
  logic [N-1:0] acc_next;
  logic         carry;

  always_comb {carry, acc_next} = {1'b0, acc} + {1'b0, code};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      tick <= 1'b0;
    end else begin
      acc  <= acc_next;
      tick <= carry;
    end
  end

  assign wave = acc[N-1];

endmodule
