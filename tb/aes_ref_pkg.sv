// aes_ref_pkg: a software reference model of AES-128 encryption used by the
// testbenches to compute expected values.
//
// It is written independently of the RTL: field multiplication reduces the
// full 15-bit carry-less product by long division, the inverse is found by
// searching for the byte whose product is 1, the affine map is written with
// byte rotations, and the cipher works on a 4x4 byte array state[r][c].
package aes_ref_pkg;

  typedef logic [7:0] u8;
  typedef u8 state_t [4][4];

  function automatic u8 ref_mul(input u8 a, input u8 b);
    logic [14:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h11B) << (i - 8);
    return p[7:0];
  endfunction

  function automatic u8 rotl8(input u8 x, input int n);
    return u8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic u8 ref_sbox(input u8 a);
    u8 inv = 8'h00;
    if (a != 0)
      for (int b = 1; b < 256; b++)
        if (ref_mul(a, u8'(b)) == 8'h01) inv = u8'(b);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic state_t to_state(input logic [127:0] v);
    state_t s;
    for (int i = 0; i < 16; i++) s[i % 4][i / 4] = v[127 - 8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_state(input state_t s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = s[i % 4][i / 4];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(input logic [127:0] v);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[8*i +: 8] = ref_sbox(v[8*i +: 8]);
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(input logic [127:0] v);
    state_t s = to_state(v), t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[r][c] = s[r][(c + r) % 4];
    return from_state(t);
  endfunction

  function automatic logic [127:0] ref_mix_columns(input logic [127:0] v);
    state_t s = to_state(v), t;
    u8 m [4][4] = '{'{8'h02, 8'h03, 8'h01, 8'h01}, '{8'h01, 8'h02, 8'h03, 8'h01},
                    '{8'h01, 8'h01, 8'h02, 8'h03}, '{8'h03, 8'h01, 8'h01, 8'h02}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[r][c] = 8'h00;
        for (int k = 0; k < 4; k++) t[r][c] ^= ref_mul(m[r][k], s[k][c]);
      end
    return from_state(t);
  endfunction

  function automatic u8 ref_rcon(input int j);  // j = 1..
    u8 r = 8'h01;
    for (int i = 1; i < j; i++) r = ref_mul(r, 8'h02);
    return r;
  endfunction

  // next round key from the previous one, j = round number 1..10
  function automatic logic [127:0] ref_next_key(input logic [127:0] k, input int j);
    logic [31:0] w [8];
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {ref_sbox(w[3][23:16]), ref_sbox(w[3][15:8]), ref_sbox(w[3][7:0]), ref_sbox(w[3][31:24])};
    t[31:24] ^= ref_rcon(j);
    for (int i = 4; i < 8; i++) begin
      w[i] = w[i-4] ^ ((i == 4) ? t : w[i-1]);
    end
    return {w[4], w[5], w[6], w[7]};
  endfunction

  function automatic logic [127:0] ref_encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] s = pt ^ key, k = key;
    for (int j = 1; j <= 10; j++) begin
      k = ref_next_key(k, j);
      s = ref_shift_rows(ref_sub_bytes(s));
      if (j != 10) s = ref_mix_columns(s);
      s ^= k;
    end
    return s;
  endfunction

endpackage
