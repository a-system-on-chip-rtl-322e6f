# Hamming [16,11,4] SECDED core for nanosatellite RAM

Radiation in low Earth orbit flips bits in the RAM of a satellite's on-board
computer. Nearly all of these upsets hit one bit at a time. This core guards
that memory with an extended Hamming code:

- each 11-bit data word gets 5 check bits and is stored as a 16-bit word,
  which is one two-byte half-word;
- when the word is read back, any single flipped bit is corrected;
- any two flipped bits are detected, and the corrupted data is withheld;
- three flags report the result of each read: NE (no error), SEC (single
  error corrected) and DED (double error detected).

The code rate is 11/16 = 68.75 %, with a bit overhead of 5/11 = 45.45 %. The
design is the Hamming [16,11,4] EDAC core of a thesis on EDAC for the
ZA-cube 2 nanosatellite, which was built on a Cyclone V DE1-SoC board. It is
written here as synthesizable SystemVerilog. The places where it departs
from that design are listed under "Departures from the original design".

## The code

### Bit layout

The codeword is non-systematic. The check bits sit at the power-of-two
positions of the classic Hamming layout, and the data bits fill the gaps
between them. Index `j` of a `[15:0]` codeword vector holds layout position
`j+1`:

| index | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  | 9  | 10 | 11 | 12 | 13  | 14  | 15  |
|-------|----|----|----|----|----|----|----|----|----|----|----|----|----|-----|-----|-----|
| bit   | P1 | P2 | D1 | P4 | D2 | D3 | D4 | P8 | D5 | D6 | D7 | D8 | D9 | D10 | D11 | P16 |

Message bit `msg[i]` is `D(i+1)`. Bit 0 of every vector is the first bit of
the layout above. This is the reverse of the usual "MSB on the left" reading
of the table, so keep it in mind when comparing waveforms.

### Parity-check matrix

The parity-check matrix H has 5 rows and 16 columns. Its rows, as 16-bit
masks (bit `j` set means codeword index `j` is in that parity group):

| row | mask   | codeword indices              |
|-----|--------|-------------------------------|
| 0   | 0xBA61 | 0 5 6 9 11 12 13 15           |
| 1   | 0x8F26 | 1 2 5 8 9 10 11 15            |
| 2   | 0x1ED4 | 2 4 6 7 9 10 11 12            |
| 3   | 0x3D38 | 3 4 5 8 10 11 12 13           |
| 4   | 0xFFFF | all (overall parity)          |

The whole SECDED behaviour follows from the shape of this matrix:

- Every column has row 4 set. All 16 columns are different, and none is
  zero.
- A single upset at index `j` therefore gives a syndrome equal to column `j`.
  That syndrome has bit 4 set. The 16 columns use up all 16 syndromes with
  bit 4 set, so every such syndrome names exactly one bit.
- Two upsets give the XOR of two different columns. That value is non-zero,
  and its bit 4 is clear. So it can never be mistaken for a clean word or
  for a single upset.

The syndrome that each bit produces, written as `s0 s1 s2 s3 s4`:

```
index : 0     1     2     3     4     5     6     7
synd  : 10001 01001 01101 00011 00111 11011 10101 00101
index : 8     9     10    11    12    13    14    15
synd  : 01011 11101 01111 11111 10111 10011 00001 11001
```

### Check-bit equations

Each check bit is the XOR of seven message bits:

| check bit | index | covers                       |
|-----------|-------|------------------------------|
| P1        | 0     | D1 D2 D3 D5 D6 D9 D11        |
| P2        | 1     | D2 D3 D4 D6 D7 D10 D11       |
| P4        | 3     | D2 D3 D5 D7 D8 D9 D10        |
| P8        | 7     | D1 D2 D4 D6 D7 D8 D9         |
| P16       | 15    | D1 D2 D4 D5 D8 D10 D11       |

These equations are the unique solution of `H * c^T = 0` with the check bits
at indices 0, 1, 3, 7 and 15. Every valid codeword has even weight, and its
minimum distance is 4.

## Encoder and decoder

`hamming16_encoder` is purely combinational. It copies the 11 data bits to
their indices and computes each check bit as an AND mask followed by an XOR
reduction. The result is five 7-input XOR trees.

`hamming16_decoder` is also purely combinational. It works in four steps:

1. **Syndrome.** `syndrome[r]` is the XOR of the bits picked out by row `r`
   of H.
2. **Classification.**

   | syndrome                | flag | data output                      |
   |-------------------------|------|----------------------------------|
   | zero                    | NE   | data bits as read                |
   | non-zero, bit 4 = 1     | SEC  | data bits with one bit corrected |
   | non-zero, bit 4 = 0     | DED  | all zeros                        |

   Exactly one flag is high for any input.
3. **Correction.** On SEC, the decoder compares the syndrome with all 16
   columns of H and inverts the bit that matches.
4. **Extraction.** The message is taken from indices 2, 4–6 and 8–14.

The decoder also has a `syndrome` output, which is useful for logging where
upsets land. The top level leaves it unconnected.

Three or more upsets are beyond what the code guarantees. An odd number looks
like a single upset and is miscorrected. An even number is reported as DED.

## The core: `edac_top`

```
 datain ──► [din_q] ──► encoder ──► data_to_memory
  (11)       reg               (16)      │
                                         ▼  XOR seu_mask (16)
 dataout, ne, sec, ded ◄── [out regs] ◄── decoder
```

### Registers and clear

- All registers load on the rising edge of `clk`.
- `clr_n` is an asynchronous, active-low clear. It zeroes the input
  register, `dataout` and all three flags at once, not at the next edge.
- While `clr_n` is low, all flags read 0. This is the only time no flag is
  set.

### Latency

A word that is on `datain` at rising edge *t* behaves like this:

- it is in the input register after edge *t*;
- its encoded form is on `data_to_memory` during the following cycle;
- its corrected data and flags appear on the outputs after edge *t+1*.

So the latency is one clock from the input register to the output registers.
A new word can be accepted every clock. The longest combinational path runs
from `din_q` through the encoder, the syndrome trees and the correction mux
to the output registers.

### Storage and upset injection

The storage between encoder and decoder is a direct connection, as in the
original core. The real memory is the on-board computer's RAM, which is
outside this design. Radiation upsets are modelled by `seu_mask`:

- a 1 in `seu_mask` flips that bit of the stored word before it is decoded;
- `seu_mask` applies to the word that is in the input register during that
  cycle;
- with `seu_mask` tied to zero, the core is a plain encode/decode pipeline.

To use the core in front of a real RAM, write `data_to_memory` into the RAM
and feed the word read back into the decoder in place of
`data_to_memory ^ seu_mask`.

### Assertions

`edac_top` carries two assertions:

- at most one flag is ever set;
- DED always comes with a zero `dataout`.

## Departures from the original design

- **Check bits P2 and P16.** In the original encoder, the equations for P2
  (index 1) and P16 (index 15) do not satisfy the decoder's parity-check
  matrix. With those equations, about half of all error-free words would
  produce syndrome `10000` and be flagged as double errors.
  - The decoder's matrix, its syndrome equations and its correction table
    all agree with each other. This design keeps them.
  - It derives all five check-bit equations from that matrix. P1, P4 and P8
    come out the same as the original; P2 and P16 differ.
  - The encoder testbench would reject the original P2 or P16 equation.
- **Input register clear.** The original main module clears only the output
  registers and freezes the input register during clear, relying on its
  power-up value of zero. This design clears the input register too, which
  matches the stated intent that all registers are cleared.
- **Test ports.** `seu_mask`, `data_to_memory` and the decoder's `syndrome`
  output are additions. They make upsets injectable and observable without
  forcing internal signals.

### Not included

- The smaller [7,4,3] and [8,4,4] codes that preceded this one during
  development.
- The RAM and the host processor.
- Anything about FPGA resources or timing. The original build reports
  12 ALMs, 24 registers and 27 I/O pins, and meets a 1.8 ns clock on a
  Cyclone V. This RTL has 25 flip-flops (11 + 11 + 3). Its functional pins
  are `datain`, `dataout`, the three flags, `clk` and `clr_n`: 27 in all.

## Files

| file                          | contents                                          |
|-------------------------------|---------------------------------------------------|
| `rtl/hamming16_pkg.sv`        | sizes, types, H rows, data and check positions    |
| `rtl/hamming16_encoder.sv`    | combinational encoder                             |
| `rtl/hamming16_decoder.sv`    | combinational syndrome decoder with NE/SEC/DED    |
| `rtl/edac_top.sv`             | registered core with clear and upset injection    |
| `tb/tb_hamming16_ref_pkg.sv`  | independent reference model used by all testbenches |
| `tb/tb_hamming16_encoder.sv`  | encoder test                                      |
| `tb/tb_hamming16_decoder.sv`  | decoder test                                      |
| `tb/tb_edac_top.sv`           | end-to-end core test                              |
| `tb/tb_edac_upset_sequence.sv` | directed bench demonstration with one fixed word |

The reference model is written from the per-bit syndrome table shown above,
not from the RTL's matrices. Its encoder searches the 32 possible settings of
the check bits for the one with a zero syndrome.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Run them
with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hamming16_pkg.sv tb/tb_hamming16_ref_pkg.sv \
  rtl/hamming16_encoder.sv rtl/hamming16_decoder.sv rtl/edac_top.sv \
  tb/tb_edac_top.sv --top-module tb_edac_top -Mdir obj_top
./obj_top/Vtb_edac_top
```

For the unit tests, replace the testbench file and the top module name with
`tb_hamming16_encoder` or `tb_hamming16_decoder`. Each testbench runs in well
under a second.

What the testbenches check:

- **Encoder.** All 2048 messages against the reference encoding, with data
  positions and even overall parity checked for each. Also the weight of
  every generator row (at least 4), and linearity on random pairs.
- **Decoder.** All 2048 messages in four ways:
  - error free;
  - with each of the 16 single upsets, where the syndrome must equal the
    expected column;
  - with each of the 120 double upsets;
  - with one triple upset, which must not read as clean.
- **Core.** A stream of 4000 random words at full speed, each with zero, one
  or two random upsets. The test checks the stored codeword, the one-cycle
  latency, the corrected data and the flags. The asynchronous clear is
  asserted at start-up and twice mid-stream, between clock edges. Every
  mechanism must occur: clean read, correction, double detection and clear.
- **Upset sequence.** One fixed word, `11'h01F`, stored as `16'h01FE`. The
  test holds clear, reads the word clean, then flips each of the 16 stored
  bits in turn and expects SEC with the data intact. It then flips 16 bit
  pairs and expects DED with the data cleared. Finally it clears between
  edges and reads the word clean again.

The code has no size parameters; 11/16/5 are fixed by the code itself. To
change the code, edit `H_ROWS`, `DATA_POS`, `CHECK_POS` and `CHECK_MASK` in
`hamming16_pkg`. Keep every column of H distinct, non-zero and with its last
row set. Then re-derive the check masks from `H * c^T = 0`, and update the
reference table in `tb_hamming16_ref_pkg` to match.
