// tb_ara_pkg -- checks the code matrices and helper functions of ara_pkg.
//
// The parity-check rows and columns derived by the package are compared with
// the Tanner-graph connections listed for the code (check nodes f0, f1, f2 and
// bit nodes c1, c2, c3), and parity_of() is compared, for all 256 words, with a
// reference built here from the generator matrix written out row by row.
// Finally, every row of H must annihilate every codeword (c.H^T = 0).
module tb_ara_pkg;
  import ara_pkg::*;

  localparam logic [15:0] G_ROW [8] = '{
    16'b1000000001010111, 16'b0100000001010000, 16'b0010000000101100,
    16'b0001000000101111, 16'b0000100000010001, 16'b0000010000010000,
    16'b0000001011110000, 16'b0000000100001111
  };

  int checks = 0, failures = 0;

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %04h expected %04h", what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] c;
    logic [7:0]  p;
    #1;
    expect_eq("K", 16'(K), 16'd8);
    expect_eq("N", 16'(N), 16'd16);
    expect_eq("words per block", 16'(WORDS_PER_BLOCK), 16'd128);
    // check nodes: f0 = {c6, c8}, f1 = {c0, c1, c6, c9}, f2 = {c2, c3, c6, c10}
    expect_eq("h_row(0)", h_row(0), 16'h0140);
    expect_eq("h_row(1)", h_row(1), 16'h0243);
    expect_eq("h_row(2)", h_row(2), 16'h044C);
    // bit nodes: c1 -> f1 f3, c2 -> f2 f4 f5, c3 -> f2 f4 f5 f6 f7, c8 -> f0
    expect_eq("h_col(1)", 16'(h_col(1)), 16'h000A);
    expect_eq("h_col(2)", 16'(h_col(2)), 16'h0034);
    expect_eq("h_col(3)", 16'(h_col(3)), 16'h00F4);
    expect_eq("h_col(8)", 16'(h_col(8)), 16'h0001);
    for (int v = 0; v < 256; v++) begin
      p = '0;
      for (int col = 8; col < 16; col++)
        for (int i = 0; i < 8; i++)
          p[col-8] ^= v[i] & G_ROW[i][15-col];
      expect_eq("parity_of", 16'(parity_of(8'(v))), 16'(p));
      c = {parity_of(8'(v)), 8'(v)};
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (^(c & h_row(j))) begin
          failures++;
          $display("FAIL word %02h violates check %0d", v, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
