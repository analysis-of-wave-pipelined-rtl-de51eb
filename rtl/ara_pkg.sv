// ara_pkg -- shared sizes, types and code matrices of the rate-1/2 ARA-LDPC codec.
//
// The code works on 8-bit message words and produces 16-bit systematic codewords
// c = [m | p]: codeword bit c[i] is message bit m[i] for i < 8 and parity bit
// p[i-8] for i >= 8.  The parity part P of the generator matrix G = [I | P] is the
// 8x8 matrix of the ARA code below; row i of P lists the parity bits that message
// bit m[i] feeds.  The parity-check matrix follows as H = [P^T | I]: check node
// f_j covers every message bit i with P[i][j] = 1 plus parity bit c[8+j].  Blocks
// are 1024 bits, i.e. 128 words.  The matrices and sizes are those of the code
// this design implements; the iteration limit of the decoder is this design's
// own choice.
package ara_pkg;

  localparam int unsigned K          = 8;            // message word length (bits)
  localparam int unsigned N          = 2 * K;        // codeword length, rate 1/2
  localparam int unsigned M          = N - K;        // number of check nodes
  localparam int unsigned BLOCK_BITS = 1024;         // message bits per block
  localparam int unsigned WORDS_PER_BLOCK = BLOCK_BITS / K;
  localparam int unsigned MAX_ITER_DEFAULT = 8;      // decoder iteration limit

  typedef logic [K-1:0] msg_t;
  typedef logic [N-1:0] cw_t;
  typedef logic [M-1:0] syn_t;

  // P_ROW[i][j] = 1 when message bit i contributes to parity bit j.
  typedef logic [M-1:0] prow_t;
  localparam prow_t P_ROW [K] = '{
    8'b1110_1010,   // m0 -> p1 p3 p5 p6 p7
    8'b0000_1010,   // m1 -> p1 p3
    8'b0011_0100,   // m2 -> p2 p4 p5
    8'b1111_0100,   // m3 -> p2 p4 p5 p6 p7
    8'b1000_1000,   // m4 -> p3 p7
    8'b0000_1000,   // m5 -> p3
    8'b0000_1111,   // m6 -> p0 p1 p2 p3
    8'b1111_0000    // m7 -> p4 p5 p6 p7
  };

  // Row j of H as an N-bit mask over the codeword: column j of P, then the
  // identity bit of parity bit j.
  function automatic cw_t h_row(int unsigned j);
    cw_t r;
    r = '0;
    for (int unsigned i = 0; i < K; i++) r[i] = P_ROW[i][j];
    r[K + j] = 1'b1;
    return r;
  endfunction

  // Column i of H as an M-bit mask over the check nodes.
  function automatic syn_t h_col(int unsigned i);
    syn_t c;
    for (int unsigned j = 0; j < M; j++) c[j] = h_row(j)[i];
    return c;
  endfunction

  // Parity bits of one message word: p[j] = XOR of m[i] over P[i][j] = 1.
  function automatic syn_t parity_of(msg_t m);
    syn_t p;
    p = '0;
    for (int unsigned i = 0; i < K; i++)
      if (m[i]) p ^= P_ROW[i];
    return p;
  endfunction

endpackage
