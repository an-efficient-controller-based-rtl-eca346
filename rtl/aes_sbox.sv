// aes_sbox: the AES S-box for one byte, a purely combinational 256-entry ROM.
//
// The input byte's high nibble selects the row and its low nibble the column
// of the 16x16 substitution table; the selected entry is the output. The
// table is not typed in: it is computed at elaboration from the S-box
// definition (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, 00
// kept as 00, followed by the affine map with constant 0x63), see aes_pkg.
// A synthesizer sees a constant-indexed ROM and may map it to LUTs or to a
// block RAM. No clock; output follows the input combinationally.
//
// The row/column lookup and the table's construction follow the published
// description; computing the table instead of storing a listing is this
// design's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  localparam sbox_table_t SBOX = gen_sbox_table();

  logic [3:0] row, col;

  always_comb begin
    row      = in_byte[7:4];
    col      = in_byte[3:0];
    out_byte = SBOX[{row, col}];
  end

endmodule
