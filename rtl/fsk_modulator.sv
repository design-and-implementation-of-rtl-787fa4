// fsk_modulator: 2FSK modulator built on a DDFS.
//
// The carrier code from the hopping memory is used as is for a logic-0
// data symbol and raised by the deviation code DF_CODE (10 kHz) for a
// logic-1 symbol; the result drives the DDFS. With a 100 kHz carrier the
// output is 100 kHz for 0 and 110 kHz for 1, as in the design. The adder
// is registered so that the DDFS sees a code that changes only on a clock
// edge; that register is this design's choice.
//
// Interface: clk, rst_n, carrier (code of the current hop frequency),
// data bit in; code (the code applied to the DDFS) and sample out.
// Timing: code follows carrier/data by one clock; the DDFS phase uses it
// the clock after that, and the sample appears one clock later again.
module fsk_modulator
  import fhss_pkg::*;
#(
  parameter fcode_t      DF_CODE = L_DF,
  parameter int unsigned AW      = 13
) (
  input  logic    clk,
  input  logic    rst_n,
  input  fcode_t  carrier,
  input  logic    data,
  output fcode_t  code,
  output sample_t sample
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code <= '0;
    else        code <= carrier + (data ? DF_CODE : '0);
  end

  fcode_t phase;

  ddfs #(.AW(AW)) u_ddfs (
    .clk, .rst_n, .code, .phase, .sample
  );

endmodule
