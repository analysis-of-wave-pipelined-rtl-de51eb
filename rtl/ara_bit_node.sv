// ara_bit_node -- one bit (variable) node c_i of the hard-decision decoder.
//
// The bit node decides its bit by majority vote over its received channel bit
// and the messages of the check nodes connected to it (COL_MASK, column i of the
// parity-check matrix H, selects them).  With d connected checks there are d+1
// votes; the bit becomes 1 when more than half of the votes are 1 and 0 when
// fewer than half are.  On a tie the received bit is kept -- a tie rule is this
// design's own choice.
// Interface: rx_bit and msgs (M, one per check node) in, decision out.
// Timing: combinational.  The default mask is column 0 of the code's H.
module ara_bit_node
  import ara_pkg::*;
#(
  parameter syn_t COL_MASK = ara_pkg::h_col(0)
) (
  input  logic rx_bit,
  input  syn_t msgs,
  output logic decision
);

  localparam int unsigned VOTES = 1 + $countones(COL_MASK);

  logic [$clog2(M+2)-1:0] ones;

  always_comb begin
    ones = ($clog2(M+2))'(rx_bit);
    for (int unsigned j = 0; j < M; j++)
      ones = ones + ($clog2(M+2))'(msgs[j] & COL_MASK[j]);
    if (2 * int'(ones) > int'(VOTES))      decision = 1'b1;
    else if (2 * int'(ones) < int'(VOTES)) decision = 1'b0;
    else                                   decision = rx_bit;
  end

endmodule
