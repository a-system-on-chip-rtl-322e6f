// hamming16_decoder: combinational syndrome decoder of the extended Hamming
// [16,11,4] code (SECDED: single error correction, double error detection).
//
// How it works:
//   1. Syndrome. syndrome[r] is the XOR of the codeword bits selected by row
//      r of the parity-check matrix H (an AND mask followed by an XOR tree).
//   2. Classification. A zero syndrome means no error (ne). Because the last
//      row of H is all ones, syndrome[4] is the overall parity: a non-zero
//      syndrome with syndrome[4] = 1 is a single upset (sec), with
//      syndrome[4] = 0 an even number of upsets, reported as a double error
//      (ded).
//   3. Correction. On a single upset, the bit whose H column equals the
//      syndrome is inverted. All 16 odd-parity syndromes are columns of H,
//      so every sec case names exactly one bit.
//   4. Extraction. The 11 message bits are read from indices 2,4,5,6,8..14
//      of the corrected word. On a double error the message output is
//      forced to zero, so uncorrectable data is never passed on as valid.
//
// Interface: codeword (16) in; msg (11), syndrome (5), ne, sec, ded out.
// Exactly one of ne/sec/ded is high for any input. Timing: purely
// combinational.
//
// H, the flag rules and the zeroing of the message on a double error follow
// the source design; exposing the syndrome as an output is this design's
// addition, for observability.
module hamming16_decoder
  import hamming16_pkg::*;
(
  input  cw_t   codeword,
  output msg_t  msg,
  output synd_t syndrome,
  output logic  ne,
  output logic  sec,
  output logic  ded
);

  cw_t corrected;

  always_comb begin
    for (int unsigned r = 0; r < R; r++) syndrome[r] = ^(codeword & H_ROWS[r]);
  end

  assign ne  = (syndrome == '0);
  assign sec = !ne &&  syndrome[R-1];
  assign ded = !ne && !syndrome[R-1];

  always_comb begin
    corrected = codeword;
    if (sec) begin
      for (int unsigned j = 0; j < N; j++)
        if (h_column(pos_t'(j)) == syndrome) corrected[j] = !codeword[j];
    end
  end

  always_comb begin
    msg = '0;
    if (!ded) begin
      for (int unsigned i = 0; i < K; i++) msg[i] = corrected[DATA_POS[i]];
    end
  end

endmodule
