// ara_parity_network -- combinational parity generator of the ARA encoder.
//
// Produces the 8 parity bits of one 8-bit message word as a flat XOR network:
// parity bit p[j] is the modulo-2 sum of every message bit m[i] whose row of the
// generator's parity part P has a 1 in column j (see ara_pkg::P_ROW).  This is the
// composition of the outer accumulator, puncturing, repeat-by-3, interleaver and
// inner accumulator of the ARA encoder, collapsed into one level of logic as the
// generator matrix describes it.  The network holds no state, so in the
// wave-pipelined encoder successive words travel through it back to back with no
// register in between.
//
// Interface: msg (8 bits) in, parity (8 bits) out.  Timing: purely combinational.
// The delay-equalising buffers a wave-pipelined implementation places in the
// shorter paths have no logic function and are left to physical design.
module ara_parity_network
  import ara_pkg::*;
(
  input  msg_t msg,
  output syn_t parity
);

  always_comb begin
    parity = '0;
    for (int unsigned j = 0; j < M; j++) begin
      for (int unsigned i = 0; i < K; i++) begin
        parity[j] = parity[j] ^ (msg[i] & P_ROW[i][j]);
      end
    end
  end

endmodule
