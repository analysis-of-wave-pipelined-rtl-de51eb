// ara_block_framer -- groups the word stream into 1024-bit blocks.
//
// The codec moves data one 8-bit message word (one 16-bit codeword) at a time;
// a block of BLOCK_BITS message bits is WORDS = BLOCK_BITS / 8 consecutive words.
// This counter tracks the position of the current word inside its block and
// marks the first (sob) and last (eob) word.  blocks counts completed blocks
// (wrapping).  The block and word sizes are those of the design; the counter and
// its flags are this design's own framing.
//
// Interface: advance is high for one cycle per word that moves on; word_idx,
// sob and eob describe the word that moves with the next advance (they are
// valid in the same cycle as advance).  rst_n is active-low synchronous.
module ara_block_framer
  import ara_pkg::*;
#(
  parameter int unsigned WORDS = ara_pkg::WORDS_PER_BLOCK
) (
  input  logic clk,
  input  logic rst_n,
  input  logic advance,
  output logic [$clog2(WORDS)-1:0] word_idx,
  output logic sob,
  output logic eob,
  output logic [15:0] blocks
);

  localparam logic [$clog2(WORDS)-1:0] LAST = ($clog2(WORDS))'(WORDS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word_idx <= '0;
      blocks   <= '0;
    end else if (advance) begin
      if (word_idx == LAST) begin
        word_idx <= '0;
        blocks   <= blocks + 16'd1;
      end else begin
        word_idx <= word_idx + 1'b1;
      end
    end
  end

  assign sob = (word_idx == '0);
  assign eob = (word_idx == LAST);

endmodule
