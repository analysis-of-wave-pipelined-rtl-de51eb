// tb_ara_block_framer -- word counting into 1024-bit blocks.
//
// Runs the framer at its default size (128 words of 8 bits per block) with a
// randomly gated advance for three and a half blocks and checks word index,
// first-word and last-word flags and the completed-block count against a
// counter kept here.
module tb_ara_block_framer;
  import ara_pkg::*;

  logic clk = 0, rst_n = 0, advance = 0;
  logic [6:0] word_idx;
  logic sob, eob;
  logic [15:0] blocks;
  int   checks = 0, failures = 0;
  int   exp_idx = 0, exp_blocks = 0, words = 0, eobs = 0;

  always #5 clk = ~clk;

  ara_block_framer dut (.*);

  always @(posedge clk) begin
    if (rst_n) begin
      checks += 4;
      if (int'(word_idx) != exp_idx) begin failures++; $display("FAIL idx %0d exp %0d", word_idx, exp_idx); end
      if (sob !== (exp_idx == 0))    begin failures++; $display("FAIL sob at %0d", exp_idx); end
      if (eob !== (exp_idx == 127))  begin failures++; $display("FAIL eob at %0d", exp_idx); end
      if (int'(blocks) != exp_blocks) begin failures++; $display("FAIL blocks %0d exp %0d", blocks, exp_blocks); end
      if (advance) begin
        words++;
        if (exp_idx == 127) begin exp_idx = 0; exp_blocks++; eobs++; end
        else exp_idx++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (words < 3 * 128 + 64) begin
      @(negedge clk);
      advance = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk) advance = 0;
    @(posedge clk);
    checks++;
    if (eobs != 3) begin failures++; $display("FAIL %0d blocks completed", eobs); end
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
