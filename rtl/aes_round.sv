// aes_round: one AES round for either direction, built from the shared transformation blocks.
//
// Encryption round:  SubBytes, ShiftRows, MixColumns (left out when last = 1), AddRoundKey.
// Decryption round:  InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns (left out when
//                    last = 1), the standard inverse cipher order.
// Because ShiftRows and SubBytes commute, both directions run the same chain
//   shift rows -> 16 S-boxes -> (add key for decryption) -> mix columns -> (add key for
//   encryption)
// with every block set to its inverse function by dec.  One set of 16 S-boxes, one
// shift-rows block and one mix-columns block therefore serve both directions.
// Purely combinational; the caller registers the result once per round.
module aes_round
  import aes_pkg::*;
(
  input  state_t din,
  input  state_t round_key,
  input  logic   dec,    // 0: encryption round, 1: decryption round
  input  logic   last,   // final round: no (Inv)MixColumns
  output state_t dout
);

  state_t shifted, subbed, mix_in, mixed, mix_sel;

  aes_shift_rows u_shift (.din(din), .inv(dec), .dout(shifted));

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    aes_sbox u_sbox (.din(shifted[8*k +: 8]), .inv(dec), .dout(subbed[8*k +: 8]));
  end

  assign mix_in = dec ? (subbed ^ round_key) : subbed;

  aes_mix_columns u_mix (.din(mix_in), .inv(dec), .dout(mixed));

  assign mix_sel = last ? mix_in : mixed;
  assign dout    = dec ? mix_sel : (mix_sel ^ round_key);

endmodule
