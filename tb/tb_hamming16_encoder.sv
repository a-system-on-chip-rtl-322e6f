// tb_hamming16_encoder: exhaustive self-checking test of the encoder.
//
// All 2048 messages are applied. For each, the codeword must equal the
// reference encoding (message at indices 2,4,5,6,8..14, check bits chosen so
// that the reference syndrome is zero), and its overall parity must be even.
// A second pass checks linearity: enc(a ^ b) == enc(a) ^ enc(b) for random
// pairs, which every linear block code satisfies. A distance check confirms
// that no two distinct messages give codewords closer than 4 bits apart for
// the single-bit messages (minimum weight of the generator rows).
module tb_hamming16_encoder;
  import tb_hamming16_ref_pkg::*;

  logic [10:0] msg;
  logic [15:0] codeword;
  int checks = 0, failures = 0;

  hamming16_encoder dut (.msg(msg), .codeword(codeword));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s msg=%h cw=%h", what, msg, codeword);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ca, cb;
    for (int v = 0; v < 2048; v++) begin
      msg = 11'(v);
      #1;
      check(codeword == ref_encode(msg), "codeword");
      check(ref_extract(codeword) == msg, "data positions");
      check(^codeword == 1'b0, "overall parity");
    end
    // generator rows: every single-bit message gives weight >= 4
    for (int i = 0; i < 11; i++) begin
      msg = 11'(1) << i;
      #1;
      check($countones(codeword) >= 4, "row weight");
    end
    // linearity
    for (int t = 0; t < 200; t++) begin
      logic [10:0] a, b;
      a = 11'($urandom); b = 11'($urandom);
      msg = a; #1; ca = codeword;
      msg = b; #1; cb = codeword;
      msg = a ^ b; #1;
      check(codeword == (ca ^ cb), "linearity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
