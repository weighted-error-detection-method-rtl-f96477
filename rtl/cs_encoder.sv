// cs_encoder: checksum generator (the "encoder" of the router).
//
// Combinational. Produces the 8-bit checksum of a 34-bit flit (inverted
// modulo-256 byte sum, see wed_pkg). The router holds a single instance and
// shares it between flits injected by the local core and head flits leaving
// on the four neighbour outputs, as in the proposed router architecture.
// The checksum as error-detection code follows the document; its exact form
// is this design's choice.
module cs_encoder
  import wed_pkg::*;
(
  input  flit_t flit,
  output chk_t  chk
);
  assign chk = checksum(flit);
endmodule
