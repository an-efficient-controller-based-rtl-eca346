// key_round_function: one step of the AES-128 key expansion, turning the four
// words w0..w3 of one round key into the four words of the next.
//
//   g(w3) = SubWord(RotWord(w3)) ^ {rcon, 00, 00, 00}
//   w4 = w0 ^ g(w3),  w5 = w1 ^ w4,  w6 = w2 ^ w5,  w7 = w3 ^ w6
//
// RotWord turns bytes [B0 B1 B2 B3] into [B1 B2 B3 B0]; SubWord passes each
// byte through the S-box (four aes_sbox ROMs); the round constant is XORed
// into the leftmost byte only. Word w0 is bits 127:96 of key_in. Ten
// applications, with rcon = 01,02,04,08,10,20,40,80,1B,36, produce the 44
// words of the expanded key. Combinational, no clock.
//
// RotWord, SubWord, the round constant and the XOR chain follow the
// published key-expansion description; word order on the bus is this design's
// choice.
module key_round_function
  import aes_pkg::*;
(
  input  block_t key_in,
  input  byte_t  rcon,
  output block_t key_out
);

  word_t w0, w1, w2, w3;
  word_t rot, sub, g;
  word_t w4, w5, w6, w7;

  assign {w0, w1, w2, w3} = key_in;

  // RotWord: one-byte circular left shift
  assign rot = {w3[23:0], w3[31:24]};

  // SubWord
  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (.in_byte(rot[31 - 8*b -: 8]), .out_byte(sub[31 - 8*b -: 8]));
  end

  always_comb begin
    g  = sub ^ {rcon, 24'h000000};
    w4 = w0 ^ g;
    w5 = w1 ^ w4;
    w6 = w2 ^ w5;
    w7 = w3 ^ w6;
  end

  assign key_out = {w4, w5, w6, w7};

endmodule
