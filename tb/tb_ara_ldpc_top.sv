// tb_ara_ldpc_top -- end-to-end run of the codec at its default sizes.
//
// Two 1024-bit blocks (2 x 128 random 8-bit words) are encoded, the first block
// back to back at one word per clock and the second with random gaps.  Every
// codeword is checked against a reference encoder written here from the
// generator matrix, together with the block framing (first/last word, word
// index, completed blocks).  The codewords then pass a channel that leaves some
// clean, flips one bit the decoder is able to repair in others, and flips one
// bit it cannot repair in the rest; they are decoded under random output
// back-pressure and each result is compared with a reference decoder model.
// Clean and repaired words must return the original message.  Each mechanism --
// back-to-back encoding, encoder gaps, block ends on both sides, clean
// acceptance, correction, the iteration-limit stop and output stalls -- is
// counted and must occur at least once.
module tb_ara_ldpc_top;
  import ara_pkg::*;

  localparam int unsigned WORDS = 128;
  localparam int unsigned NBLK  = 2;
  localparam int unsigned MAXIT = 8;
  localparam logic [15:0] G_ROW [8] = '{
    16'b1000000001010111, 16'b0100000001010000, 16'b0010000000101100,
    16'b0001000000101111, 16'b0000100000010001, 16'b0000010000010000,
    16'b0000001011110000, 16'b0000000100001111
  };

  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0;
  msg_t enc_in_msg = '0;
  logic enc_out_valid;
  cw_t  enc_out_cw;
  logic enc_out_sob, enc_out_eob;
  logic [6:0] enc_word_idx, dec_word_idx;
  logic [15:0] enc_blocks, dec_blocks;
  logic dec_in_valid = 0, dec_in_ready;
  cw_t  dec_in_cw = '0;
  logic dec_out_valid, dec_out_ready = 0;
  msg_t dec_out_msg;
  cw_t  dec_out_cw;
  logic dec_out_converged;
  logic [3:0] dec_out_iters;
  logic dec_out_sob, dec_out_eob;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ara_ldpc_top dut (.*);

  // ---- reference models ----------------------------------------------------
  bit hmat [8][16];
  initial begin
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 16; i++)
        hmat[j][i] = (i >= 8) ? (i - 8 == j) : G_ROW[i][15 - (8 + j)];
  end

  function automatic logic [15:0] encode(logic [7:0] m);
    logic [15:0] c;
    c = '0;
    for (int col = 0; col < 16; col++)
      for (int i = 0; i < 8; i++)
        c[col] ^= m[i] & G_ROW[i][15-col];
    return c;
  endfunction

  typedef struct { logic [15:0] cw; bit conv; int iters; } result_t;

  function automatic logic [7:0] syndrome_of(logic [15:0] est);
    logic [7:0] s;
    s = '0;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 16; i++)
        if (hmat[j][i]) s[j] ^= est[i];
    return s;
  endfunction

  function automatic logic [15:0] vote(logic [15:0] rx, logic [15:0] est, logic [7:0] s);
    logic [15:0] nxt;
    for (int i = 0; i < 16; i++) begin
      int ones, votes;
      ones  = int'(rx[i]);
      votes = 1;
      for (int j = 0; j < 8; j++)
        if (hmat[j][i]) begin
          votes++;
          ones += int'(s[j] ^ est[i]);
        end
      nxt[i] = (2 * ones > votes) ? 1'b1 : (2 * ones < votes) ? 1'b0 : rx[i];
    end
    return nxt;
  endfunction

  function automatic result_t model(logic [15:0] rx);
    result_t res;
    logic [15:0] est;
    logic [7:0]  s;
    int it;
    est = rx;
    it  = 0;
    s   = syndrome_of(est);
    while (s != 0 && it < MAXIT) begin
      est = vote(rx, est, s);
      it++;
      s = syndrome_of(est);
    end
    res.cw = est;
    res.conv = (s == 0);
    res.iters = it;
    return res;
  endfunction

  // ---- stimulus data -----------------------------------------------------
  logic [7:0]  msgs [NBLK*WORDS];
  logic [15:0] chan [$];          // codewords after the channel
  int          kind [$];          // 0 clean, 1 repairable flip, 2 unrepairable flip
  int          repairable [3] = '{1, 2, 4};

  // ---- mechanism counters --------------------------------------------------
  int n_b2b = 0, n_gap = 0, n_enc_eob = 0, n_dec_eob = 0;
  int n_clean = 0, n_corrected = 0, n_limit = 0, n_stall = 0;

  // ---- encoder side monitor ---------------------------------------------
  int enc_n = 0;
  logic prev_enc_valid = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (enc_out_valid) begin
        logic [15:0] c, e;
        int k, b;
        e = encode(msgs[enc_n]);
        checks += 4;
        if (enc_out_cw !== e) begin
          failures++;
          $display("FAIL enc word %0d cw=%04h expected %04h", enc_n, enc_out_cw, e);
        end
        if (int'(enc_word_idx) != enc_n % WORDS) begin failures++; $display("FAIL enc idx"); end
        if (enc_out_sob !== (enc_n % WORDS == 0)) begin failures++; $display("FAIL enc sob"); end
        if (enc_out_eob !== (enc_n % WORDS == WORDS - 1)) begin failures++; $display("FAIL enc eob"); end
        if (enc_out_eob) n_enc_eob++;
        if (prev_enc_valid) n_b2b++;
        // channel
        c = enc_out_cw;
        k = enc_n % 3;
        if (k == 1) c[repairable[$urandom_range(0, 2)]] ^= 1'b1;
        if (k == 2) begin
          b = $urandom_range(5, 15);
          c[b] ^= 1'b1;
        end
        chan.push_back(c);
        kind.push_back(k);
        enc_n++;
      end else if (enc_n > 0 && enc_n < NBLK * WORDS) begin
        n_gap++;
      end
      prev_enc_valid <= enc_out_valid;
    end
  end

  // ---- decoder side ------------------------------------------------------
  int dec_sent = 0, dec_n = 0;
  logic [15:0] dsent_q [$];
  logic dec_in_ready_at_edge = 0;   // in_ready as seen by the last clock edge

  always @(negedge clk) dec_out_ready <= ($urandom_range(0, 4) != 0);

  initial begin
    @(posedge rst_n);
    while (dec_sent < NBLK * WORDS) begin
      @(negedge clk);
      if (dec_in_valid && dec_in_ready_at_edge) begin
        dec_in_valid = 0;
      end
      if (!dec_in_valid && chan.size() > dec_sent) begin
        dec_in_valid = 1;
        dec_in_cw    = chan[dec_sent];
      end
    end
  end

  always @(posedge clk) begin
    dec_in_ready_at_edge <= dec_in_ready;
    if (rst_n && dec_in_valid && dec_in_ready) begin
      dsent_q.push_back(dec_in_cw);
      dec_sent++;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (dec_out_valid && !dec_out_ready) n_stall++;
      if (dec_out_valid && dec_out_ready) begin
        logic [15:0] rx;
        result_t r;
        int k;
        rx = dsent_q.pop_front();
        r  = model(rx);
        k  = kind[dec_n];
        checks += 4;
        if (dec_out_cw !== r.cw || dec_out_msg !== r.cw[7:0] ||
            dec_out_converged !== r.conv || int'(dec_out_iters) != r.iters) begin
          failures++;
          $display("FAIL dec word %0d rx=%04h cw=%04h conv=%0b it=%0d exp %04h %0b %0d",
                   dec_n, rx, dec_out_cw, dec_out_converged, dec_out_iters, r.cw, r.conv, r.iters);
        end
        if (k != 2) begin
          checks++;
          if (dec_out_msg !== msgs[dec_n] || !dec_out_converged) begin
            failures++;
            $display("FAIL dec word %0d message %02h expected %02h", dec_n, dec_out_msg, msgs[dec_n]);
          end
        end
        checks += 2;
        if (dec_out_sob !== (dec_n % WORDS == 0)) begin failures++; $display("FAIL dec sob"); end
        if (dec_out_eob !== (dec_n % WORDS == WORDS - 1)) begin failures++; $display("FAIL dec eob"); end
        if (dec_out_eob) n_dec_eob++;
        if (r.conv && r.iters == 0) n_clean++;
        if (r.conv && r.iters > 0)  n_corrected++;
        if (!r.conv)                n_limit++;
        dec_n++;
      end
    end
  end

  // ---- encoder driver and end of test -----------------------------------
  initial begin
    for (int n = 0; n < NBLK * WORDS; n++) msgs[n] = 8'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < NBLK * WORDS; n++) begin
      @(negedge clk);
      if (n >= WORDS) begin
        while ($urandom_range(0, 2) == 0) begin
          enc_in_valid = 0;
          @(negedge clk);
        end
      end
      enc_in_valid = 1;
      enc_in_msg   = msgs[n];
    end
    @(negedge clk) enc_in_valid = 0;
    while (dec_n < NBLK * WORDS) @(posedge clk);
    @(posedge clk);
    checks += 3;
    if (int'(enc_blocks) != NBLK) begin failures++; $display("FAIL enc_blocks=%0d", enc_blocks); end
    if (int'(dec_blocks) != NBLK) begin failures++; $display("FAIL dec_blocks=%0d", dec_blocks); end
    if (enc_n != NBLK * WORDS) begin failures++; $display("FAIL %0d codewords", enc_n); end
    $display("back_to_back=%0d gaps=%0d enc_blocks=%0d dec_blocks=%0d", n_b2b, n_gap, n_enc_eob, n_dec_eob);
    $display("clean=%0d corrected=%0d iteration_limit=%0d stalls=%0d", n_clean, n_corrected, n_limit, n_stall);
    checks += 8;
    if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back encoding"); end
    if (n_gap == 0)       begin failures++; $display("FAIL no encoder gap"); end
    if (n_enc_eob == 0)   begin failures++; $display("FAIL no encoder block end"); end
    if (n_dec_eob == 0)   begin failures++; $display("FAIL no decoder block end"); end
    if (n_clean == 0)     begin failures++; $display("FAIL no clean word"); end
    if (n_corrected == 0) begin failures++; $display("FAIL no corrected word"); end
    if (n_limit == 0)     begin failures++; $display("FAIL no iteration-limit stop"); end
    if (n_stall == 0)     begin failures++; $display("FAIL no output stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
