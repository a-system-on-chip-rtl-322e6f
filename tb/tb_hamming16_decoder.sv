// tb_hamming16_decoder: exhaustive self-checking test of the decoder.
//
// For every one of the 2048 messages the reference codeword is presented
// error free, with each of the 16 single-bit upsets and with each of the
// 120 double-bit upsets. Expected results:
//   no upset     : ne only, message intact, syndrome zero
//   single upset : sec only, message corrected, syndrome = column of the bit
//   double upset : ded only, message forced to zero
// Triple upsets, beyond the code's guarantee, are checked only for the
// documented behaviour that they are never reported as error free.
module tb_hamming16_decoder;
  import tb_hamming16_ref_pkg::*;

  logic [15:0] codeword;
  logic [10:0] msg;
  logic [4:0]  syndrome;
  logic        ne, sec, ded;
  int checks = 0, failures = 0;
  int n_ne = 0, n_sec = 0, n_ded = 0;

  hamming16_decoder dut (.codeword(codeword), .msg(msg), .syndrome(syndrome),
                         .ne(ne), .sec(sec), .ded(ded));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s cw=%h msg=%h syn=%b ne=%b sec=%b ded=%b",
                                  what, codeword, msg, syndrome, ne, sec, ded);
    end
  endtask

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] good;
    for (int v = 0; v < 2048; v++) begin
      good = ref_encode(11'(v));
      codeword = good; #1;
      check(ne && !sec && !ded && msg == 11'(v) && syndrome == '0, "clean");
      n_ne += int'(ne);
      for (int a = 0; a < 16; a++) begin
        codeword = good ^ (16'(1) << a); #1;
        check(sec && !ne && !ded && msg == 11'(v), "single");
        check(syndrome == ref_column(4'(a)), "single syndrome");
        n_sec += int'(sec);
        for (int b = a + 1; b < 16; b++) begin
          codeword = good ^ (16'(1) << a) ^ (16'(1) << b); #1;
          check(ded && !ne && !sec && msg == '0, "double");
          n_ded += int'(ded);
        end
      end
      codeword = good ^ 16'h0083; #1;
      check(!ne, "triple not clean");
    end
    check(n_ne == 2048 && n_sec == 2048 * 16 && n_ded == 2048 * 120, "mechanism counts");
    $display("clean=%0d corrected=%0d double=%0d", n_ne, n_sec, n_ded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
