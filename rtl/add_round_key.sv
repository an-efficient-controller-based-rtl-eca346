// add_round_key: AddRoundKey, the bitwise XOR of the 128-bit state with the
// 128-bit round key. In the encryption core its output is both the input of
// the round (SubBytes) and, after the last round, the ciphertext.
// Combinational, no clock.
//
// Follows the published architecture; port names follow its schematic.
module add_round_key
  import aes_pkg::*;
(
  input  block_t input1,      // state
  input  block_t input2,      // round key
  output block_t output_data
);

  assign output_data = input1 ^ input2;

endmodule
