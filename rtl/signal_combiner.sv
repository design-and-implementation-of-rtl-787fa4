// signal_combiner: mixes the users' signals into one DAC signal.
//
// The offset-binary samples of the N users are added and the sum divided
// by N, giving their mean, which stays inside the 8-bit DAC range; the
// spectrum of the result holds all users' current carriers at once. That
// the users' signals are observed together follows the design; adding
// them digitally ahead of a single DAC, and the scaling by 1/N, are this
// design's choices.
//
// Interface: clk, rst_n, samples (one per user) in; sum (full-precision
// sum) and dac (mean, floor) out. Timing: both outputs are registered,
// one clock after the samples.
module signal_combiner
  import fhss_pkg::*;
#(
  parameter int unsigned N = NUM_USERS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t samples [N],
  output logic [SAMPLE_W+$clog2(N+1)-1:0] sum,
  output sample_t dac
);

  localparam int unsigned SW = SAMPLE_W + $clog2(N + 1);

  logic [SW-1:0] total;

  always_comb begin
    total = '0;
    for (int i = 0; i < N; i++) total += SW'(samples[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0;
      dac <= '0;
    end else begin
      sum <= total;
      dac <= SAMPLE_W'(total / SW'(N));
    end
  end

endmodule
