// hamming16_encoder: combinational encoder of the extended Hamming
// [16,11,4] code (see hamming16_pkg for the bit layout).
//
// Each codeword bit is the modulo-2 product of the message with one column
// of the generator matrix: the message is ANDed with a column mask and the
// result reduced by XOR. Data columns have a single one, so those codeword
// bits are plain copies of message bits (D1 -> index 2, ..., D11 -> index
// 14); the five check-bit columns cover seven message bits each, so the
// encoder is five 7-input XOR trees and nothing else.
//
// Interface: msg (11 bits, msg[0] = D1) in, codeword (16 bits, codeword[0] =
// P1) out. Timing: purely combinational, no clock; the enclosing design
// registers input and output.
//
// The AND/XOR structure and the data positions follow the source design;
// the check-bit masks are the ones in hamming16_pkg, derived from the
// decoder's parity-check matrix.
module hamming16_encoder
  import hamming16_pkg::*;
(
  input  msg_t msg,
  output cw_t  codeword
);

  always_comb begin
    codeword = '0;
    for (int unsigned i = 0; i < K; i++) codeword[DATA_POS[i]] = msg[i];
    for (int unsigned p = 0; p < R; p++) codeword[CHECK_POS[p]] = ^(msg & CHECK_MASK[p]);
  end

endmodule
