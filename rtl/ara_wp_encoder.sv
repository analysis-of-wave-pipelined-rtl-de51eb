// ara_wp_encoder -- wave-pipelined rate-1/2 systematic ARA-LDPC encoder.
//
// Each clock accepts one 8-bit message word and emits its 16-bit codeword
// {parity, message}: bits [7:0] carry the message unchanged (the code is
// systematic) and bits [15:8] the parity from ara_parity_network.  Following the
// wave-pipelining scheme, the only clocked storage is the input register (8 data
// flip-flops plus a valid flag); the parity network behind it has no internal
// pipeline registers, so a new word can be launched every clock while the
// previous one is still propagating, the clock period being bounded by the
// spread between the longest and shortest paths rather than by the longest.
// The delay-equalising buffers that keep those paths balanced are a physical
// matter and do not appear in RTL; logically the encoder behaves as one register
// stage followed by combinational logic.
//
// Interface: in_valid/in_msg are sampled every rising clock edge; out_valid/out_cw
// show the codeword of the word sampled at the previous edge (latency 1 clock,
// throughput 1 word per clock).  There is no back-pressure: a wave, once
// launched, cannot be held.  rst_n is an active-low synchronous reset that clears
// the valid flag.  The single input register follows the flip-flop count given
// for the wave-pipelined encoder; the valid flag and the reset are this design's
// own additions.
module ara_wp_encoder
  import ara_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  msg_t in_msg,
  output logic out_valid,
  output cw_t  out_cw
);

  msg_t msg_q;
  logic valid_q;
  syn_t parity;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      msg_q   <= '0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) msg_q <= in_msg;
    end
  end

  ara_parity_network u_parity (
    .msg    (msg_q),
    .parity (parity)
  );

  assign out_valid = valid_q;
  assign out_cw    = {parity, msg_q};

endmodule
