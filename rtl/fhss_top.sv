// fhss_top: frequency-hopping spread-spectrum transmitter for three users
// and eight frequencies, with 2FSK data modulation and slow or fast hopping.
//
// clock_signals makes the 4 Hz data square wave and the 1 Hz (slow) and
// 16 Hz (fast) hop clocks from the 50 MHz clock; `mode` picks the hop
// clock. Each hop tick advances hop_counter, whose 3-bit slot number
// addresses every user's hopping algorithm memory. Each user's fhss_user
// turns its current carrier (100..800 kHz) plus the data bit into a 2FSK
// DDFS signal (carrier + 10 kHz for a 1), and signal_combiner mixes the
// three signals into one 8-bit DAC code. In slow mode a hop lasts four data
// periods, in fast mode a data period spans about four hops.
//
// The block structure, codes, rates and the three users' hopping tables
// follow the design. Choices of this design: asynchronous active-low
// reset that starts all generators together in slot T1; a run-time
// `hop_last` input for the number of hopping frequencies used; digital
// mixing of the three users before one DAC.
//
// Interface: clk (50 MHz), rst_n, mode (HOP_SLOW / HOP_FAST), hop_last
// (index of the last slot used, 7 for all eight) in. Out: data_bit,
// hop_tick, slot, each user's carrier and applied code, each user's 8-bit
// sample, and the mixed dac code. Timing: slot changes on the clock edge
// after hop_tick; carriers follow combinationally; codes one clock later;
// samples two clocks after the code; dac one clock after the samples.
module fhss_top
  import fhss_pkg::*;
#(
  parameter fcode_t      DATA_CODE = L_DATA,
  parameter fcode_t      SLOW_CODE = L_H_SLOW,
  parameter fcode_t      FAST_CODE = L_H_FAST,
  parameter fcode_t      DF_CODE   = L_DF,
  parameter int unsigned SINE_AW   = 13
) (
  input  logic      clk,
  input  logic      rst_n,
  input  hop_mode_e mode,
  input  hop_addr_t hop_last,
  output logic      data_bit,
  output logic      hop_tick,
  output hop_addr_t slot,
  output fcode_t    carrier [NUM_USERS],
  output fcode_t    code    [NUM_USERS],
  output sample_t   sample  [NUM_USERS],
  output sample_t   dac
);

  logic data_tick, hop_wave;
  logic [SAMPLE_W+$clog2(NUM_USERS+1)-1:0] mix_sum;

  clock_signals #(
    .DATA_CODE(DATA_CODE), .SLOW_CODE(SLOW_CODE), .FAST_CODE(FAST_CODE)
  ) u_clocks (
    .clk, .rst_n, .mode, .data_bit, .data_tick, .hop_wave, .hop_tick
  );

  hop_counter #(.W(HOP_ADDR_W)) u_counter (
    .clk, .rst_n, .hop_tick, .last(hop_last), .addr(slot)
  );

  for (genvar u = 0; u < NUM_USERS; u++) begin : g_user
    fhss_user #(
      .TABLE(user_hop_table(u)), .DF_CODE(DF_CODE), .AW(SINE_AW)
    ) u_user (
      .clk, .rst_n, .slot, .data(data_bit),
      .carrier(carrier[u]), .code(code[u]), .sample(sample[u])
    );
  end

  signal_combiner #(.N(NUM_USERS)) u_mix (
    .clk, .rst_n, .samples(sample), .sum(mix_sum), .dac
  );

endmodule
