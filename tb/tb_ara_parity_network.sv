// tb_ara_parity_network -- exhaustive check of the parity generator.
//
// All 256 message words are applied; the expected parity is computed here from
// the generator matrix written out row by row (leftmost character = codeword
// column 0), independently of the package constants the design uses.
module tb_ara_parity_network;
  import ara_pkg::*;

  localparam logic [15:0] G_ROW [8] = '{
    16'b1000000001010111, 16'b0100000001010000, 16'b0010000000101100,
    16'b0001000000101111, 16'b0000100000010001, 16'b0000010000010000,
    16'b0000001011110000, 16'b0000000100001111
  };

  msg_t msg;
  syn_t parity;
  int   checks = 0, failures = 0;

  ara_parity_network dut (.msg(msg), .parity(parity));

  function automatic logic [7:0] ref_parity(logic [7:0] m);
    logic [7:0] p = '0;
    for (int c = 8; c < 16; c++)
      for (int i = 0; i < 8; i++)
        p[c-8] ^= m[i] & G_ROW[i][15-c];
    return p;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      msg = 8'(v);
      #1;
      checks++;
      if (parity !== ref_parity(msg)) begin
        failures++;
        $display("FAIL msg=%02h parity=%02h expected=%02h", msg, parity, ref_parity(msg));
      end
    end
    // A word with a single 1 gives back that message bit's row of P.
    msg = 8'h40; #1; checks++;
    if (parity !== 8'h0F) begin failures++; $display("FAIL m6 alone -> %02h", parity); end
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
