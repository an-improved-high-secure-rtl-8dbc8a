// aes_shift_rows: ShiftRows (inv = 0) or InvShiftRows (inv = 1) of a 128-bit state.
//
// Row r of the 4x4 byte state is rotated by r byte positions: to the left for encryption,
// to the right for decryption.  With the column-major byte order of aes_pkg, output byte
// (row r, column c) takes input byte (r, c+r mod 4) forward and (r, c-r mod 4) inverse.
// The block is wiring plus one 2:1 multiplexer per bit, selected by the mode, so the two
// directions share one block.  Row 0 is not rotated, so its 32 output bits are wired straight
// to the input.  Purely combinational.
module aes_shift_rows
  import aes_pkg::*;
(
  input  state_t din,
  input  logic   inv,
  output state_t dout
);

  // Byte k (k = 4*c + r) of a state, byte 0 in the most significant position.
  function automatic logic [7:0] get_byte(state_t s, int k);
    return s[127-8*k -: 8];
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        if (inv)
          dout[127-8*(4*c+r) -: 8] = get_byte(din, 4*((c+4-r)%4) + r);
        else
          dout[127-8*(4*c+r) -: 8] = get_byte(din, 4*((c+r)%4) + r);
      end
    end
  end

endmodule
