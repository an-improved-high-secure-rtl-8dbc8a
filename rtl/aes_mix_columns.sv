// aes_mix_columns: MixColumns (inv = 0) or InvMixColumns (inv = 1) of a 128-bit state.
//
// Each column is multiplied by the circulant matrix (02 03 01 01) forward or
// (0e 0b 0d 09) inverse over GF(2^8).  No multipliers are used: every constant product is
// a chain of xtime (shift and conditional XOR with 1b) steps and XORs.  The inverse is
// formed as the forward network applied after a pre-step that adds {04}(a0^a2) to rows 0
// and 2 and {04}(a1^a3) to rows 1 and 3, because (0e 0b 0d 09) = (02 03 01 01) x
// (05 00 04 00); the mode therefore only switches the pre-step on, and both directions
// share the forward XOR network.  Purely combinational.
// Doing polynomial multiplication with XORs follows the design description; the shared
// pre-step factorisation is this design's own choice.
module aes_mix_columns
  import aes_pkg::*;
(
  input  state_t din,
  input  logic   inv,
  output state_t dout
);

  always_comb begin
    dout = '0;
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3, u, v;
      a0 = din[127-32*c -: 8];
      a1 = din[119-32*c -: 8];
      a2 = din[111-32*c -: 8];
      a3 = din[103-32*c -: 8];
      u  = 8'h00;
      v  = 8'h00;
      if (inv) begin
        u  = xtime(xtime(a0 ^ a2));
        v  = xtime(xtime(a1 ^ a3));
        a0 = a0 ^ u;
        a1 = a1 ^ v;
        a2 = a2 ^ u;
        a3 = a3 ^ v;
      end
      dout[127-32*c -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      dout[119-32*c -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      dout[111-32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      dout[103-32*c -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
  end

endmodule
