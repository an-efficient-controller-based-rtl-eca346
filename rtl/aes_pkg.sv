// aes_pkg: types, constants and GF(2^8) arithmetic shared by the AES-128
// encryption core.
//
// The 128-bit state and keys travel as plain 128-bit vectors in FIPS-197 byte
// order: bus byte 0 occupies bits 127:120, and state byte S(r,c) (row r,
// column c) is bus byte 4*c + r, so the state is filled column by column.
//
// The field is GF(2^8) reduced by m(x) = x^8 + x^4 + x^3 + x + 1. Multiplying
// by {02} is a left shift followed by an XOR with 0x1B when the bit shifted
// out was 1; {03} is {02} XOR the operand. The S-box table is built at
// elaboration from its definition: each byte is replaced by its multiplicative
// inverse (00 stays 00) and then passed through the affine map
// b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i with c = 0x63.
// All functions here are pure and only evaluated on constants, except
// xtime, which is two gates per bit and used in the datapath.
//
// The field polynomial, xtime rule and S-box construction are those of the
// AES definition; generating the table by constant functions is this design's
// choice.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // The whole S-box as one packed constant: entry i in bits 8*i +: 8.
  typedef logic [255:0][7:0] sbox_table_t;

  localparam byte_t GF_POLY_LOW = 8'h1B;  // m(x) without the x^8 term
  localparam byte_t AFFINE_C    = 8'h63;

  // Multiply by x ({02}) modulo m(x).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? GF_POLY_LOW : 8'h00);
  endfunction

  // General multiplication, shift-and-add.
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t acc = 8'h00;
    byte_t p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // Multiplicative inverse as a^254 (a^(2^8 - 2)); 00 maps to 00.
  function automatic byte_t gf_inv(input byte_t a);
    byte_t result = 8'h01;
    byte_t sq     = a;
    // 254 = 0b1111_1110: multiply the squares a^2 .. a^128
    for (int i = 0; i < 8; i++) begin
      if (i != 0) result = gf_mul(result, sq);
      sq = gf_mul(sq, sq);
    end
    return result;
  endfunction

  function automatic byte_t affine(input byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8]
           ^ b[(i + 7) % 8] ^ AFFINE_C[i];
    return r;
  endfunction

  function automatic sbox_table_t gen_sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(gf_inv(byte_t'(i)));
    return t;
  endfunction

endpackage
