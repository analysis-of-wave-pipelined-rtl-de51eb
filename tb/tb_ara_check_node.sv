// tb_ara_check_node -- checks three check nodes against the code's Tanner graph.
//
// Instantiates the check nodes f0 (bits c6, c8), f1 (c0, c1, c6, c9) and
// f2 (c2, c3, c6, c10) with their masks written out here, replays the worked
// example of a valid codeword (c0=1, c1=1, c2=0, c3=1, c6=1, c8=1, c9=1, c10=0:
// every check satisfied, every response equal to the bit it goes to), then
// applies random words and compares parity and responses with a reference that
// XORs the other connected bits one by one.
module tb_ara_check_node;
  import ara_pkg::*;

  localparam cw_t MASK0 = (16'b1 << 6) | (16'b1 << 8);
  localparam cw_t MASK1 = (16'b1 << 0) | (16'b1 << 1) | (16'b1 << 6) | (16'b1 << 9);
  localparam cw_t MASK2 = (16'b1 << 2) | (16'b1 << 3) | (16'b1 << 6) | (16'b1 << 10);

  cw_t  bits;
  cw_t  resp [3];
  logic parity [3];
  int   checks = 0, failures = 0;

  ara_check_node #(.ROW_MASK(MASK0)) u_f0 (.bits(bits), .resp(resp[0]), .parity(parity[0]));
  ara_check_node #(.ROW_MASK(MASK1)) u_f1 (.bits(bits), .resp(resp[1]), .parity(parity[1]));
  ara_check_node #(.ROW_MASK(MASK2)) u_f2 (.bits(bits), .resp(resp[2]), .parity(parity[2]));

  function automatic cw_t mask_of(int f);
    return (f == 0) ? MASK0 : (f == 1) ? MASK1 : MASK2;
  endfunction

  task automatic compare(string tag);
    for (int f = 0; f < 3; f++) begin
      cw_t  m = mask_of(f);
      logic p = 0;
      cw_t  r = '0;
      for (int i = 0; i < 16; i++) if (m[i]) p ^= bits[i];
      for (int i = 0; i < 16; i++) begin
        if (m[i]) begin
          logic x = 0;
          for (int k = 0; k < 16; k++) if (m[k] && k != i) x ^= bits[k];
          r[i] = x;
        end
      end
      checks += 2;
      if (parity[f] !== p) begin
        failures++;
        $display("FAIL %s f%0d parity=%0b expected %0b bits=%04h", tag, f, parity[f], p, bits);
      end
      if (resp[f] !== r) begin
        failures++;
        $display("FAIL %s f%0d resp=%04h expected %04h bits=%04h", tag, f, resp[f], r, bits);
      end
    end
  endtask

  initial begin
    // worked example: valid codeword, responses echo the bits
    bits = '0;
    bits[0] = 1; bits[1] = 1; bits[3] = 1; bits[6] = 1; bits[8] = 1; bits[9] = 1;
    #1;
    compare("example");
    checks += 3;
    if (parity[0] || parity[1] || parity[2]) begin failures++; $display("FAIL example parity"); end
    if (resp[1] !== (MASK1 & bits)) begin failures++; $display("FAIL example f1 resp"); end
    if (resp[2] !== 16'b0000_0000_0100_1000) begin failures++; $display("FAIL example f2 resp"); end
    // one flipped bit: the check fails and every response flips
    bits[6] = 0;
    #1;
    compare("flip");
    checks++;
    if (!parity[0] || !parity[1] || !parity[2]) begin failures++; $display("FAIL flip parity"); end
    for (int n = 0; n < 2000; n++) begin
      bits = 16'($urandom);
      #1;
      compare("random");
    end
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
