// sub_byte: the SubBytes transformation on the full 128-bit AES state.
//
// Each of the 16 state bytes is replaced independently by its S-box value;
// sixteen aes_sbox ROMs work in parallel, so the whole transformation is one
// combinational stage with no clock. Byte k of input_data (bits
// 127-8k : 120-8k) maps to byte k of output_data.
//
// Follows the published architecture; the byte order is this design's choice.
module sub_byte
  import aes_pkg::*;
(
  input  block_t input_data,
  output block_t output_data
);

  for (genvar k = 0; k < 16; k++) begin : g_byte
    aes_sbox u_sbox (
      .in_byte (input_data [127 - 8*k -: 8]),
      .out_byte(output_data[127 - 8*k -: 8])
    );
  end

endmodule
