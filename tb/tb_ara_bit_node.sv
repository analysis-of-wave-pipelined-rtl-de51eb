// tb_ara_bit_node -- majority-vote bit nodes of several degrees.
//
// Bit nodes of degree 5 (c3: checks f2 f4 f5 f6 f7, 6 votes), 3 (c2: f2 f4 f5,
// 4 votes), 2 (c1: f1 f3, 3 votes, never a tie) and 1 (c8: f0, 2 votes) are
// driven exhaustively over the received bit and all 256 message patterns, so
// that unconnected message inputs are toggled too.  The expected decision
// counts votes here: more than half ones gives 1, fewer gives 0, a tie keeps the
// received bit.  The worked example of bit c3 (received 1, messages 1 1 1 0 1)
// must decode to 1 and that of c2 (received 0, messages 0 0 0) to 0.
module tb_ara_bit_node;
  import ara_pkg::*;

  localparam syn_t MASK_C3 = 8'b1111_0100;
  localparam syn_t MASK_C2 = 8'b0011_0100;
  localparam syn_t MASK_C1 = 8'b0000_1010;
  localparam syn_t MASK_C8 = 8'b0000_0001;

  logic rx_bit;
  syn_t msgs;
  logic dec [4];
  int   checks = 0, failures = 0;

  ara_bit_node #(.COL_MASK(MASK_C3)) u_c3 (.rx_bit(rx_bit), .msgs(msgs), .decision(dec[0]));
  ara_bit_node #(.COL_MASK(MASK_C2)) u_c2 (.rx_bit(rx_bit), .msgs(msgs), .decision(dec[1]));
  ara_bit_node #(.COL_MASK(MASK_C1)) u_c1 (.rx_bit(rx_bit), .msgs(msgs), .decision(dec[2]));
  ara_bit_node #(.COL_MASK(MASK_C8)) u_c8 (.rx_bit(rx_bit), .msgs(msgs), .decision(dec[3]));

  function automatic logic ref_vote(logic r, syn_t ms, syn_t mask);
    int ones = r, votes = 1;
    for (int j = 0; j < 8; j++) if (mask[j]) begin votes++; ones += ms[j]; end
    if (2 * ones > votes) return 1'b1;
    if (2 * ones < votes) return 1'b0;
    return r;
  endfunction

  int ties = 0;

  initial begin
    // worked examples
    rx_bit = 1; msgs = '0;
    msgs[2] = 1; msgs[4] = 1; msgs[5] = 1; msgs[6] = 0; msgs[7] = 1;
    #1; checks++;
    if (dec[0] !== 1'b1) begin failures++; $display("FAIL c3 example"); end
    rx_bit = 0; msgs = '0;
    #1; checks++;
    if (dec[1] !== 1'b0) begin failures++; $display("FAIL c2 example"); end

    for (int r = 0; r < 2; r++) begin
      for (int v = 0; v < 256; v++) begin
        rx_bit = 1'(r);
        msgs   = 8'(v);
        #1;
        for (int u = 0; u < 4; u++) begin
          automatic syn_t m = (u == 0) ? MASK_C3 : (u == 1) ? MASK_C2 : (u == 2) ? MASK_C1 : MASK_C8;
          checks++;
          if (dec[u] !== ref_vote(rx_bit, msgs, m)) begin
            failures++;
            $display("FAIL node %0d rx=%0b msgs=%02h dec=%0b", u, rx_bit, msgs, dec[u]);
          end
          if (2 * ($countones(msgs & m) + rx_bit) == 1 + $countones(m)) ties++;
        end
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
