// tb_ara_hd_decoder -- iterative hard-decision decoder against a reference model.
//
// The reference is written here from the generator matrix (H = [P^T | I]) and
// the decoding rules: stop with success when every check holds; otherwise let
// each bit take the majority of its received bit and the check messages (the
// XOR of the other bits of each of its checks), a tie keeping the received
// bit; stop without success after MAX_ITER updates.  Stimulus: every clean
// codeword, every codeword with each single bit flipped, and random words, with
// random gaps on the input and random back-pressure on the output.  Checked per
// word: decoded codeword and message, converged flag, iteration count, and the
// latency of iterations + 2 clocks from acceptance to the result.  A final
// burst of clean codewords, with the output always accepted, must be taken at
// the sustained rate of one word every 2 clocks.
module tb_ara_hd_decoder;
  import ara_pkg::*;

  localparam int unsigned MAXIT = 8;
  localparam logic [15:0] G_ROW [8] = '{
    16'b1000000001010111, 16'b0100000001010000, 16'b0010000000101100,
    16'b0001000000101111, 16'b0000100000010001, 16'b0000010000010000,
    16'b0000001011110000, 16'b0000000100001111
  };

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  cw_t  in_cw = '0;
  logic out_valid, out_ready = 0;
  msg_t out_msg;
  cw_t  out_cw;
  logic out_converged;
  logic [3:0] out_iters;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ara_hd_decoder #(.MAX_ITER(MAXIT)) dut (.*);

  // ---- reference model ----------------------------------------------------
  // H[j][i], filled at time 0 from the generator rows.
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

  // ---- scoreboard ----------------------------------------------------------
  int cycle = 0;
  always @(posedge clk) cycle++;

  logic [15:0] sent_q [$];
  int          take_cycle_q [$];
  bit          shown = 0;
  int          n_clean = 0, n_corrected = 0, n_limit = 0, n_stall = 0, n_done = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        sent_q.push_back(in_cw);
        take_cycle_q.push_back(cycle);
      end
      if (out_valid && !shown) begin
        result_t r;
        r = model(sent_q[0]);
        checks++;
        if (cycle - take_cycle_q[0] != r.iters + 2) begin
          failures++;
          $display("FAIL latency %0d for %0d iterations", cycle - take_cycle_q[0], r.iters);
        end
      end
      shown <= out_valid && !out_ready;
      if (out_valid && !out_ready) n_stall++;
      if (out_valid && out_ready) begin
        logic [15:0] rx;
        result_t r;
        rx = sent_q.pop_front();
        r = model(rx);
        void'(take_cycle_q.pop_front());
        checks += 4;
        n_done++;
        if (out_cw !== r.cw || out_msg !== r.cw[7:0] || out_converged !== r.conv ||
            int'(out_iters) != r.iters) begin
          failures++;
          $display("FAIL rx=%04h got cw=%04h conv=%0b it=%0d exp cw=%04h conv=%0b it=%0d",
                   rx, out_cw, out_converged, out_iters, r.cw, r.conv, r.iters);
        end
        if (r.conv && r.iters == 0) n_clean++;
        if (r.conv && r.iters > 0)  n_corrected++;
        if (!r.conv)                n_limit++;
      end
    end
  end

  task automatic send(logic [15:0] w);
    @(negedge clk);
    while ($urandom_range(0, 3) == 0) begin
      in_valid = 0;
      @(negedge clk);
    end
    in_valid = 1;
    in_cw    = w;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  bit burst = 0;   // during the burst test the output is always accepted
  always @(negedge clk) out_ready <= burst || ($urandom_range(0, 3) != 0);

  // Sustained rate: clean words offered back to back must be taken every
  // 2 clocks.
  int last_take = -1, n_rate = 0;
  always @(posedge clk) begin
    if (burst && in_valid && in_ready) begin
      if (last_take >= 0) begin
        checks++;
        n_rate++;
        if (cycle - last_take != 2) begin
          failures++;
          $display("FAIL clean words taken %0d clocks apart", cycle - last_take);
        end
      end
      last_take = cycle;
    end
  end

  int total = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 256; m++) begin send(encode(8'(m))); total++; end
    for (int m = 0; m < 256; m++)
      for (int b = 0; b < 16; b++) begin
        send(encode(8'(m)) ^ (16'b1 << b));
        total++;
      end
    for (int n = 0; n < 1000; n++) begin send(16'($urandom)); total++; end
    while (n_done < total) @(posedge clk);
    // burst of clean codewords, input held valid
    @(negedge clk);
    burst = 1;
    for (int n = 0; n < 100; n++) begin
      in_valid = 1;
      in_cw    = encode(8'($urandom));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      total++;
      @(negedge clk);
    end
    in_valid = 0;
    while (n_done < total) @(posedge clk);
    checks++;
    if (n_rate < 99) begin failures++; $display("FAIL burst saw %0d intervals", n_rate); end
    checks++;
    if (n_clean == 0 || n_corrected == 0 || n_limit == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL a case never happened");
    end
    $display("clean=%0d corrected=%0d limit=%0d stalls=%0d", n_clean, n_corrected, n_limit, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
