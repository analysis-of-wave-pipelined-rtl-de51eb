// tb_ara_wp_encoder -- stream test of the wave-pipelined encoder.
//
// Drives random message words, first back to back (one per clock) and then with
// random gaps, and checks that each codeword appears exactly one clock after its
// word was applied: systematic half equal to the message, parity half equal to
// a reference computed here from the generator matrix, and every codeword
// satisfying all eight parity checks of H = [P^T | I].
module tb_ara_wp_encoder;
  import ara_pkg::*;

  localparam logic [15:0] G_ROW [8] = '{
    16'b1000000001010111, 16'b0100000001010000, 16'b0010000000101100,
    16'b0001000000101111, 16'b0000100000010001, 16'b0000010000010000,
    16'b0000001011110000, 16'b0000000100001111
  };

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  msg_t in_msg = '0;
  logic out_valid;
  cw_t  out_cw;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ara_wp_encoder dut (.*);

  function automatic logic [15:0] ref_cw(logic [7:0] m);
    logic [15:0] c = '0;
    for (int col = 0; col < 16; col++)
      for (int i = 0; i < 8; i++)
        c[col] ^= m[i] & G_ROW[i][15-col];
    return c;
  endfunction

  function automatic bit satisfies_h(logic [15:0] c);
    for (int j = 0; j < 8; j++) begin
      logic s = c[8+j];
      for (int i = 0; i < 8; i++) s ^= c[i] & G_ROW[i][15-(8+j)];
      if (s) return 0;
    end
    return 1;
  endfunction

  // expected output for the next cycle
  logic exp_valid = 0;
  logic [7:0] exp_msg = '0;
  int   outputs = 0, back_to_back = 0;
  logic prev_valid = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("FAIL valid=%0b expected %0b", out_valid, exp_valid);
      end else if (out_valid) begin
        checks += 2;
        outputs++;
        if (prev_valid) back_to_back++;
        if (out_cw !== ref_cw(exp_msg)) begin
          failures++;
          $display("FAIL msg=%02h cw=%04h expected %04h", exp_msg, out_cw, ref_cw(exp_msg));
        end
        if (!satisfies_h(out_cw)) begin
          failures++;
          $display("FAIL cw=%04h violates H", out_cw);
        end
      end
      prev_valid <= out_valid;
      exp_valid  <= in_valid;
      if (in_valid) exp_msg <= in_msg;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // back-to-back words: one codeword per clock
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_msg   = 8'($urandom);
    end
    // with gaps
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_msg   = 8'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (back_to_back < 299) begin
      failures++;
      $display("FAIL only %0d back-to-back codewords", back_to_back);
    end
    $display("codewords=%0d back_to_back=%0d", outputs, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
