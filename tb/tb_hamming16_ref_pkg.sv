// tb_hamming16_ref_pkg: reference model of the [16,11,4] code for the
// testbenches, written independently of the RTL tables.
//
// The code is described here the way the decoder's correction table lists
// it: for every codeword index 0..15 the 5-bit syndrome that an upset of
// that bit produces, spelled s0 s1 s2 s3 s4 from left to right. The
// reference syndrome of a word is the XOR of the columns of its set bits.
// The reference encoder places the message at indices 2,4,5,6,8..14 and
// then searches the 32 settings of the check bits at 0,1,3,7,15 for the one
// that gives a zero syndrome, so it needs no generator matrix at all.
package tb_hamming16_ref_pkg;

  localparam string COLUMN [16] = '{
    "10001", "01001", "01101", "00011", "00111", "11011", "10101", "00101",
    "01011", "11101", "01111", "11111", "10111", "10011", "00001", "11001"
  };
  localparam int DPOS [11] = '{2, 4, 5, 6, 8, 9, 10, 11, 12, 13, 14};
  localparam int PPOS [5]  = '{0, 1, 3, 7, 15};

  function automatic logic [4:0] ref_column(input logic [3:0] j);
    logic [4:0] c;
    for (int b = 0; b < 5; b++) c[b] = (COLUMN[j][b] == "1");
    return c;
  endfunction

  function automatic logic [4:0] ref_syndrome(input logic [15:0] cw);
    logic [4:0] s = '0;
    for (int j = 0; j < 16; j++) if (cw[j]) s ^= ref_column(4'(j));
    return s;
  endfunction

  function automatic logic [15:0] ref_encode(input logic [10:0] msg);
    logic [15:0] cw;
    for (int p = 0; p < 32; p++) begin
      cw = '0;
      for (int i = 0; i < 11; i++) cw[DPOS[i]] = msg[i];
      for (int b = 0; b < 5; b++) cw[PPOS[b]] = p[b];
      if (ref_syndrome(cw) == '0) return cw;
    end
    return 'x;
  endfunction

  function automatic logic [10:0] ref_extract(input logic [15:0] cw);
    logic [10:0] m;
    for (int i = 0; i < 11; i++) m[i] = cw[DPOS[i]];
    return m;
  endfunction

endpackage
