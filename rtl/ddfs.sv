// ddfs: direct digital frequency synthesizer.
//
// A 32-bit phase accumulator adds the frequency code L every clock; its top
// AW bits address the sine ROM, whose 8-bit samples go to the DAC. The
// output frequency is F_OUT = F_CLK * L / 2^32, with a resolution of
// 50 MHz / 2^32 = 0.0116 Hz. A new code takes effect on the next clock and
// the phase is continuous across code changes, which is what makes the
// frequency hops and the 2FSK shifts clean. The accumulator width and the
// sample width follow the design; phase truncation to AW bits and the
// one-cycle ROM latency are this design's choices.
//
// Interface: clk, rst_n (clears the phase to 0), code in; phase (the
// accumulator) and sample out. Timing: sample is the ROM word addressed by
// the accumulator value of the previous cycle (latency one clock from
// phase to sample).
module ddfs
  import fhss_pkg::*;
#(
  parameter int unsigned AW = 13
) (
  input  logic    clk,
  input  logic    rst_n,
  input  fcode_t  code,
  output fcode_t  phase,
  output sample_t sample
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + code;
  end

  sine_rom #(.AW(AW), .DW(SAMPLE_W)) u_rom (
    .clk,
    .addr(phase[PHASE_W-1 -: AW]),
    .data(sample)
  );

endmodule
