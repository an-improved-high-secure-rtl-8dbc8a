// aes_pkg: shared types, constants and GF(2^8) helper functions of the AES core.
//
// The state is a 128-bit vector in FIPS-197 byte order: byte 0 (the first byte of the
// block, row 0 / column 0) sits in bits [127:120], byte 4*c+r is row r of column c.
// A 32-bit key word holds its first byte in bits [31:24].  Key lengths of 128, 192 and
// 256 bits are selected at run time by key_len_e; the number of key words Nk and rounds
// Nr follow from it as in the AES standard.  Field arithmetic uses the AES polynomial
// x^8 + x^4 + x^3 + x + 1 and is written as shifts and XORs only, no multipliers.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;

  typedef enum logic [1:0] {
    KEY128 = 2'd0,
    KEY192 = 2'd1,
    KEY256 = 2'd2
  } key_len_e;

  // Number of 32-bit words in the cipher key (4, 6 or 8).
  function automatic logic [3:0] nk_of(key_len_e kl);
    case (kl)
      KEY192:  return 4'd6;
      KEY256:  return 4'd8;
      default: return 4'd4;
    endcase
  endfunction

  // Number of rounds (10, 12 or 14).
  function automatic logic [3:0] nr_of(key_len_e kl);
    case (kl)
      KEY192:  return 4'd12;
      KEY256:  return 4'd14;
      default: return 4'd10;
    endcase
  endfunction

  // Multiplication by x ({02}) in GF(2^8).
  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product by shift-and-XOR.
  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse, a^254 (0 maps to 0), by square-and-multiply.
  function automatic logic [7:0] ginv(logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128;
    a2   = gmul(a, a);
    a4   = gmul(a2, a2);
    a8   = gmul(a4, a4);
    a16  = gmul(a8, a8);
    a32  = gmul(a16, a16);
    a64  = gmul(a32, a32);
    a128 = gmul(a64, a64);
    // 254 = 128+64+32+16+8+4+2
    return gmul(gmul(gmul(a128, a64), gmul(a32, a16)), gmul(gmul(a8, a4), a2));
  endfunction

  // Round constant for key-expansion step i (i = 1..10): x^(i-1).
  function automatic logic [7:0] rcon(logic [3:0] i);
    logic [7:0] r;
    r = 8'h01;
    for (int k = 2; k <= 10; k++)
      if (k <= int'(i)) r = xtime(r);
    return r;
  endfunction

endpackage
