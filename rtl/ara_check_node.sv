// ara_check_node -- one check node f_j of the hard-decision decoder.
//
// The check node sees the current bit estimates of the whole codeword and a
// constant mask ROW_MASK, row j of the parity-check matrix H, that selects the
// bit nodes connected to it.  It outputs
//   * parity: the XOR of all connected bits; 0 means check j is satisfied;
//   * resp[i]: for every connected bit node c_i, the value c_i must take for the
//     check to hold if all other connected bits are right, i.e. the XOR of the
//     other connected bits, which equals parity ^ bits[i].  Unconnected
//     positions read 0.
// Interface: bits (N) in, resp (N) and parity out.  Timing: combinational.
// The default mask is row 0 of the code's H so the module elaborates on its own.
module ara_check_node
  import ara_pkg::*;
#(
  parameter cw_t ROW_MASK = ara_pkg::h_row(0)
) (
  input  cw_t  bits,
  output cw_t  resp,
  output logic parity
);

  assign parity = ^(bits & ROW_MASK);
  assign resp   = (bits ^ {N{parity}}) & ROW_MASK;

endmodule
