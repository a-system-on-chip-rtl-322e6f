// hamming16_pkg: shared sizes, types and code tables of the extended
// Hamming [16,11,4] SECDED code used by the EDAC core.
//
// The code protects an 11-bit message with 5 check bits, giving a 16-bit
// codeword (two bytes, one memory half-word). The codeword is
// non-systematic: bit index j of a codeword holds "bit position j+1" of the
// classic Hamming layout
//
//   index    : 0  1  2  3  4  5  6  7  8  9  10 11 12 13 14  15
//   contents : P1 P2 D1 P4 D2 D3 D4 P8 D5 D6 D7 D8 D9 D10 D11 P16
//
// so the message bits sit at indices 2,4,5,6,8..14 and the check bits at
// 0,1,3,7,15. The parity-check matrix H (5 x 16) is given row by row in
// H_ROWS; its last row is all ones (overall parity), so every column has
// bit 4 set and all 16 columns are distinct and non-zero. That makes the
// syndrome of a single upset equal to the H column of the flipped bit, and
// a double upset a non-zero syndrome with bit 4 clear.
//
// The H matrix, the data positions and the syndrome-to-position table are
// those of the source design. The check-bit equations (CHECK_MASK) are
// derived here from H by requiring H * c^T = 0 for every codeword c; three
// of the five agree with the source design's encoder, the equations for P2
// (index 1) and P16 (index 15) are recomputed so that encoder and decoder
// use one and the same code.
package hamming16_pkg;

  localparam int unsigned K = 11;  // message bits
  localparam int unsigned N = 16;  // codeword bits
  localparam int unsigned R = 5;   // check bits / syndrome bits

  typedef logic [K-1:0] msg_t;
  typedef logic [N-1:0] cw_t;
  typedef logic [R-1:0] synd_t;
  typedef logic [3:0]   pos_t;     // bit index inside a codeword

  // Rows of the parity-check matrix; bit j of row r is H[r][j].
  // Row 4 is the overall parity row used for double-error detection.
  localparam logic [R-1:0][N-1:0] H_ROWS = {
    16'hFFFF,   // row 4: all bits
    16'h3D38,   // row 3: 3,4,5,8,10,11,12,13
    16'h1ED4,   // row 2: 2,4,6,7,9,10,11,12
    16'h8F26,   // row 1: 1,2,5,8,9,10,11,15
    16'hBA61    // row 0: 0,5,6,9,11,12,13,15
  };

  // Codeword index of message bit i (element 0 = D1).
  localparam logic [K-1:0][3:0] DATA_POS = {
    4'd14, 4'd13, 4'd12, 4'd11, 4'd10, 4'd9, 4'd8, 4'd6, 4'd5, 4'd4, 4'd2
  };

  // Codeword index of check bit p and the message bits it covers
  // (bit i of the mask set = message bit i enters the XOR).
  localparam logic [R-1:0][3:0] CHECK_POS = {4'd15, 4'd7, 4'd3, 4'd1, 4'd0};
  localparam logic [R-1:0][K-1:0] CHECK_MASK = {
    11'h69B,    // index 15 (P16): D1 D2 D4 D5 D8 D10 D11
    11'h1EB,    // index 7  (P8) : D1 D2 D4 D6 D7 D8 D9
    11'h3D6,    // index 3  (P4) : D2 D3 D5 D7 D8 D9 D10
    11'h66E,    // index 1  (P2) : D2 D3 D4 D6 D7 D10 D11
    11'h537     // index 0  (P1) : D1 D2 D3 D5 D6 D9 D11
  };

  // Column j of H: the syndrome produced by an upset of codeword bit j.
  function automatic synd_t h_column(input pos_t j);
    synd_t col;
    for (int unsigned r = 0; r < R; r++) col[r] = H_ROWS[r][j];
    return col;
  endfunction

endpackage
