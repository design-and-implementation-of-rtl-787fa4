// hop_rom: one user's hopping algorithm memory, 8 words x 32 bits.
//
// Word s holds the DDFS frequency code of the carrier the user transmits
// on in hop slot s (T1..T8). The contents are the TABLE parameter, by
// default the first user's algorithm from fhss_pkg; a new hopping
// algorithm is loaded by changing the parameter. The memory size follows
// the design; the read is combinational (an 8-word table maps to logic),
// which is this design's choice.
//
// Interface: addr in (hop slot), code out, valid in the same cycle.
module hop_rom
  import fhss_pkg::*;
#(
  parameter hop_table_t TABLE = user_hop_table(0)
) (
  input  hop_addr_t addr,
  output fcode_t    code
);

  assign code = TABLE[addr];

endmodule
