// shift_rows: the ShiftRows transformation on the 128-bit AES state.
//
// Row r of the 4x4 state is rotated left by r byte positions (row 0 stays,
// row 3 moves by three), so out S(r,c) = in S(r,(c+r) mod 4). The state is
// stored column by column on the bus: S(r,c) is bus byte 4c+r, byte 0 in bits
// 127:120. Pure wiring, combinational, no clock.
//
// The offsets 0,1,2,3 follow the published description; the column-major bus
// order is this design's choice (the FIPS-197 convention).
module shift_rows
  import aes_pkg::*;
(
  input  block_t input_data,
  output block_t output_data
);

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        output_data[127 - 8*(4*c + r) -: 8] =
          input_data[127 - 8*(4*((c + r) % 4) + r) -: 8];
  end

endmodule
