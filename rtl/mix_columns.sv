// mix_columns: the MixColumns transformation on the 128-bit AES state.
//
// Each column (s0,s1,s2,s3) is multiplied in GF(2^8) by the circulant matrix
// with first row 02 03 01 01:
//   s0' = 2*s0 ^ 3*s1 ^   s2 ^   s3      s1' =   s0 ^ 2*s1 ^ 3*s2 ^   s3
//   s2' =   s0 ^   s1 ^ 2*s2 ^ 3*s3      s3' = 3*s0 ^   s1 ^   s2 ^ 2*s3
// 2*a is xtime (shift left, XOR 0x1B if the top bit was set) and 3*a is
// 2*a ^ a, so the block is XOR gates only. Column c is bus bytes 4c..4c+3.
// Combinational, no clock.
//
// The matrix and the {02}/{03} multiplication rules follow the published
// description.
module mix_columns
  import aes_pkg::*;
(
  input  block_t input_data,
  output block_t output_data
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t s0, s1, s2, s3;
      s0 = input_data[127 - 8*(4*c + 0) -: 8];
      s1 = input_data[127 - 8*(4*c + 1) -: 8];
      s2 = input_data[127 - 8*(4*c + 2) -: 8];
      s3 = input_data[127 - 8*(4*c + 3) -: 8];
      output_data[127 - 8*(4*c + 0) -: 8] = xtime(s0) ^ (xtime(s1) ^ s1) ^ s2 ^ s3;
      output_data[127 - 8*(4*c + 1) -: 8] = s0 ^ xtime(s1) ^ (xtime(s2) ^ s2) ^ s3;
      output_data[127 - 8*(4*c + 2) -: 8] = s0 ^ s1 ^ xtime(s2) ^ (xtime(s3) ^ s3);
      output_data[127 - 8*(4*c + 3) -: 8] = (xtime(s0) ^ s0) ^ s1 ^ s2 ^ xtime(s3);
    end
  end

endmodule
