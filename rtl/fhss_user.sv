// fhss_user: the spreader of one user.
//
// The shared hop slot number addresses this user's hopping algorithm
// memory (hop_rom, contents TABLE); the code read is the carrier of a 2FSK
// modulator that also takes the shared data bit. Each user thus sends the
// same data on its own sequence of carriers, and all users hop at the same
// instants. This structure follows the design's functional diagram.
//
// Interface: clk, rst_n, slot (hop slot, 0 = T1), data in; carrier (code of
// the current hop frequency, combinational from slot), code (carrier plus
// FSK deviation, one clock later) and sample (8-bit DAC sample) out.
module fhss_user
  import fhss_pkg::*;
#(
  parameter hop_table_t  TABLE   = user_hop_table(0),
  parameter fcode_t      DF_CODE = L_DF,
  parameter int unsigned AW      = 13
) (
  input  logic      clk,
  input  logic      rst_n,
  input  hop_addr_t slot,
  input  logic      data,
  output fcode_t    carrier,
  output fcode_t    code,
  output sample_t   sample
);

  hop_rom #(.TABLE(TABLE)) u_rom (.addr(slot), .code(carrier));

  fsk_modulator #(.DF_CODE(DF_CODE), .AW(AW)) u_mod (
    .clk, .rst_n, .carrier, .data, .code, .sample
  );

endmodule
