// hop_counter: binary counter that steps through the hop slots.
//
// Each hop_tick advances the 3-bit count, which addresses every user's
// hopping algorithm memory, so all users hop together. The count wraps to
// 0 after `last`, which sets how many of the eight frequencies are used
// (last = 7 uses all eight, the default configuration); the number of
// hopping frequencies being a run-time control follows the design, the
// wrap-at-`last` encoding is this design's choice. If `last` is lowered
// below the current count, the next tick returns the count to 0.
//
// Interface: clk, rst_n (clears the count to slot 0, T1), hop_tick,
// last in; addr out. Timing: addr changes on the clock edge at which
// hop_tick is high.
module hop_counter #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hop_tick,
  input  logic [W-1:0] last,
  output logic [W-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      addr <= '0;
    else if (hop_tick)
      addr <= (addr >= last) ? '0 : addr + 1'b1;
  end

endmodule
