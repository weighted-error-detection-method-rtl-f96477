// cs_decoder: checksum checker (the "decoder" of the router).
//
// Combinational. Recomputes the checksum of a received flit and compares it
// with the checksum carried on the link side band; err is 1 on mismatch.
// The router holds one shared instance: it checks head flits arriving from
// neighbours (switch-to-switch check) and, when no head is waiting, the flit
// ejected to the local core (end-to-end check of the payload).
module cs_decoder
  import wed_pkg::*;
(
  input  flit_t flit,
  input  chk_t  chk,
  output logic  err
);
  assign err = (checksum(flit) != chk);
endmodule
