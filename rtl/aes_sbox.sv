// aes_sbox: one byte of SubBytes or InvSubBytes, sharing a single multiplicative inverse.
//
// Both directions of the AES S-box are built around the same GF(2^8) inverter, which is
// the point of sharing the S-box between encryption and decryption:
//   forward (inv = 0): out = Affine(Inverse(in))
//   inverse (inv = 1): out = Inverse(InvAffine(in))
// Two 2:1 byte multiplexers place the affine or inverse-affine map in front of or behind
// the inverter.  The inverter is computed as a^254 with XOR/shift logic (no look-up table),
// so the block is purely combinational with no clock and no latency.
// Sharing the inverter follows the design description; building it as an exponentiation
// network rather than a ROM or a composite-field inverter is this design's own choice.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] din,
  input  logic       inv,   // 0: S-box, 1: inverse S-box
  output logic [7:0] dout
);

  logic [7:0] pre, inverse, aff, inv_aff;

  // Inverse affine map: b_i = a_(i+2) ^ a_(i+5) ^ a_(i+7) ^ {05}_i
  always_comb begin
    for (int i = 0; i < 8; i++)
      inv_aff[i] = din[(i+2)%8] ^ din[(i+5)%8] ^ din[(i+7)%8];
    inv_aff = inv_aff ^ 8'h05;
  end

  assign pre     = inv ? inv_aff : din;
  assign inverse = ginv(pre);

  // Forward affine map: b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ {63}_i
  always_comb begin
    for (int i = 0; i < 8; i++)
      aff[i] = inverse[i] ^ inverse[(i+4)%8] ^ inverse[(i+5)%8]
             ^ inverse[(i+6)%8] ^ inverse[(i+7)%8];
    aff = aff ^ 8'h63;
  end

  assign dout = inv ? inverse : aff;

endmodule
