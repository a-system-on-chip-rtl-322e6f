// edac_top: EDAC core that protects 11-bit words held in the on-board
// computer's RAM with the extended Hamming [16,11,4] code.
//
// Datapath (one word per clock):
//
//   datain -> [input reg] -> encoder -> data_to_memory
//                                          |  XOR seu_mask (upsets in storage)
//                                          v
//             dataout/ne/sec/ded <- [output regs] <- decoder
//
// The input word is registered, encoded into the 16-bit word written to
// memory, and the word read back is decoded; the corrected message and the
// three flags (ne = no error, sec = single error corrected, ded = double
// error detected, message forced to zero) are registered on the outputs.
// As in the source design the storage itself is not part of the core: the
// path from encoder to decoder is direct, and radiation upsets are
// represented by seu_mask, whose set bits are flipped in the stored word.
// With seu_mask = 0 the core behaves exactly as encoder followed by decoder.
//
// Interface: clk (rising edge); clr_n, asynchronous active-low clear of all
// registers; datain (11); seu_mask (16); data_to_memory (16, combinational
// from the input register); dataout (11), ne, sec, ded (registered).
//
// Timing: a word on datain at rising edge t is in the input register after
// t; its decoded result and flags appear on the outputs after edge t+1
// (one clock of latency from the input register, two edges from datain).
// seu_mask applies to the word stored during the cycle before edge t+1.
//
// Following the source design: the register placement, the active-low
// clear of the output registers and the flag set. This design's own
// choices: the input register is cleared by clr_n as well (the source
// design only freezes it during clear and relies on its power-up value of
// zero), and seu_mask is a port rather than a forced signal in simulation.
module edac_top
  import hamming16_pkg::*;
(
  input  logic clk,
  input  logic clr_n,
  input  msg_t datain,
  input  cw_t  seu_mask,
  output cw_t  data_to_memory,
  output msg_t dataout,
  output logic ne,
  output logic sec,
  output logic ded
);

  msg_t  din_q;
  cw_t   data_from_memory;
  msg_t  dec_msg;
  logic  dec_ne, dec_sec, dec_ded;

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) din_q <= '0;
    else        din_q <= datain;
  end

  hamming16_encoder u_encoder (
    .msg      (din_q),
    .codeword (data_to_memory)
  );

  assign data_from_memory = data_to_memory ^ seu_mask;

  hamming16_decoder u_decoder (
    .codeword (data_from_memory),
    .msg      (dec_msg),
    .syndrome (),
    .ne       (dec_ne),
    .sec      (dec_sec),
    .ded      (dec_ded)
  );

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      dataout <= '0;
      ne      <= 1'b0;
      sec     <= 1'b0;
      ded     <= 1'b0;
    end else begin
      dataout <= dec_msg;
      ne      <= dec_ne;
      sec     <= dec_sec;
      ded     <= dec_ded;
    end
  end

  // At most one flag is ever set (all three are clear only during clear).
  a_flags_exclusive : assert property (@(posedge clk) disable iff (!clr_n)
    (32'(ne) + 32'(sec) + 32'(ded)) <= 1);

  // A double error never lets data through.
  a_ded_zeroes_data : assert property (@(posedge clk) disable iff (!clr_n)
    ded |-> (dataout == '0));

endmodule
