// clock_signals: data generator and hopping impulse generators.
//
// Three square_gen phase accumulators run from the 50 MHz clock: the data
// square wave (code L_DATA, 4 Hz by default), the slow hop clock (L_H_SLOW,
// 1 Hz) and the fast hop clock (L_H_FAST, 16 Hz). `mode` selects which hop
// clock advances the hopping; the selected generator's wrap tick becomes
// `hop_tick`. The data wave is the 2FSK data bit for all users.
//
// All three accumulators are cleared by the same reset, so data and hop
// clocks start in phase; with the default codes L_DATA = 4 * L_H_SLOW,
// each slow hop carries exactly four data periods. Both hop generators run
// all the time, so changing `mode` takes effect at the next tick of the
// newly selected clock without a spurious hop; this is the design's choice.
//
// Interface: clk, rst_n, mode in; data_bit, data_tick (data wave wrap),
// hop_wave (selected hop square wave) and hop_tick out. hop_tick is a
// one-cycle pulse, registered in square_gen.
module clock_signals
  import fhss_pkg::*;
#(
  parameter fcode_t DATA_CODE   = L_DATA,
  parameter fcode_t SLOW_CODE   = L_H_SLOW,
  parameter fcode_t FAST_CODE   = L_H_FAST
) (
  input  logic      clk,
  input  logic      rst_n,
  input  hop_mode_e mode,
  output logic      data_bit,
  output logic      data_tick,
  output logic      hop_wave,
  output logic      hop_tick
);

  logic slow_wave, slow_tick, fast_wave, fast_tick;

  square_gen #(.N(PHASE_W)) u_data (
    .clk, .rst_n, .code(DATA_CODE), .wave(data_bit), .tick(data_tick)
  );
  square_gen #(.N(PHASE_W)) u_slow (
    .clk, .rst_n, .code(SLOW_CODE), .wave(slow_wave), .tick(slow_tick)
  );
  square_gen #(.N(PHASE_W)) u_fast (
    .clk, .rst_n, .code(FAST_CODE), .wave(fast_wave), .tick(fast_tick)
  );

  always_comb begin
    if (mode == HOP_FAST) begin
      hop_wave = fast_wave;
      hop_tick = fast_tick;
    end else begin
      hop_wave = slow_wave;
      hop_tick = slow_tick;
    end
  end

endmodule
