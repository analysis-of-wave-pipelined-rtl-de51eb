// ara_hd_decoder -- iterative hard-decision decoder of the (16,8) ARA-LDPC code.
//
// The decoder is the Tanner graph of the code built out in parallel: 8 check
// nodes (ara_check_node, one per row of H) and 16 bit nodes (ara_bit_node, one
// per codeword bit), wired wherever H has a 1.  One iteration takes one clock:
//   1. the bit nodes present their current estimates (initially the received
//      bits) to the check nodes;
//   2. every check node forms its parity and, for each connected bit node, the
//      value that bit must have for the check to hold.  If all parities are 0
//      (c.H^T = 0) the word is accepted and decoding stops here;
//   3. otherwise every bit node takes the majority of its received bit and the
//      check-node messages as its new estimate, and the loop returns to 2.
// The second stop rule ends decoding after MAX_ITER updates with the syndrome
// still non-zero; the word is then delivered with converged = 0.
//
// Interface: a valid/ready stream on each side.  A codeword is taken when
// in_valid && in_ready; the result is shown while out_valid is high and is held
// until out_ready.  out_msg is the systematic part (bits [7:0]) of the decoded
// codeword out_cw; out_iters counts the estimate updates performed.
// Timing: a word that needs k updates is delivered k+2 clocks after it is taken
// (k = 0 for a clean word).  A new word may be taken in the same cycle the
// previous result is accepted.  rst_n is active-low synchronous.
// Parallel node units, majority voting and both stop rules follow the algorithm
// the code is meant to be decoded with; the one-iteration-per-clock schedule,
// the tie rule of the bit nodes, MAX_ITER and the handshake are this design's
// own choices.
module ara_hd_decoder
  import ara_pkg::*;
#(
  parameter int unsigned MAX_ITER = ara_pkg::MAX_ITER_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  // received codewords
  input  logic in_valid,
  output logic in_ready,
  input  cw_t  in_cw,
  // decoded words
  output logic out_valid,
  input  logic out_ready,
  output msg_t out_msg,
  output cw_t  out_cw,
  output logic out_converged,
  output logic [$clog2(MAX_ITER+1)-1:0] out_iters
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_DONE} state_t;

  localparam int unsigned IW = $clog2(MAX_ITER + 1);

  state_t         state_q;
  cw_t            rx_q;      // received word, kept for the majority votes
  cw_t            est_q;     // current bit estimates
  logic [IW-1:0]  iter_q;
  logic           conv_q;

  // ---- check nodes -------------------------------------------------------
  cw_t  cn_resp [M];         // cn_resp[j][i]: message from f_j to c_i
  syn_t syndrome;

  for (genvar j = 0; j < M; j++) begin : g_cn
    ara_check_node #(.ROW_MASK(h_row(j))) u_cn (
      .bits   (est_q),
      .resp   (cn_resp[j]),
      .parity (syndrome[j])
    );
  end

  // ---- bit nodes ---------------------------------------------------------
  cw_t next_est;

  for (genvar i = 0; i < N; i++) begin : g_bn
    syn_t msgs;
    for (genvar j = 0; j < M; j++) begin : g_msg
      assign msgs[j] = cn_resp[j][i];
    end
    ara_bit_node #(.COL_MASK(h_col(i))) u_bn (
      .rx_bit   (rx_q[i]),
      .msgs     (msgs),
      .decision (next_est[i])
    );
  end

  // ---- control -------------------------------------------------------------
  wire take = in_valid && in_ready;

  assign in_ready = (state_q == S_IDLE) || (state_q == S_DONE && out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      rx_q    <= '0;
      est_q   <= '0;
      iter_q  <= '0;
      conv_q  <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: begin
          if (take) begin
            rx_q    <= in_cw;
            est_q   <= in_cw;
            iter_q  <= '0;
            conv_q  <= 1'b0;
            state_q <= S_ITER;
          end else if (state_q == S_DONE && out_ready) begin
            state_q <= S_IDLE;
          end
        end
        S_ITER: begin
          if (syndrome == '0) begin
            conv_q  <= 1'b1;
            state_q <= S_DONE;
          end else if (iter_q == IW'(MAX_ITER)) begin
            conv_q  <= 1'b0;
            state_q <= S_DONE;
          end else begin
            est_q   <= next_est;
            iter_q  <= iter_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign out_valid     = (state_q == S_DONE);
  assign out_cw        = est_q;
  assign out_msg       = est_q[K-1:0];
  assign out_converged = conv_q;
  assign out_iters     = iter_q;

  // A result, once shown, stays put until it is accepted.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_cw) && $stable(out_converged);
  endproperty
  a_hold: assert property (p_hold);

endmodule
