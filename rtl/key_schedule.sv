// key_schedule: the key half of the encryption loop, computing one round key
// per clock.
//
// A multiplexer in front of a 128-bit key register selects the cipher key
// while rst is high and otherwise the output of key_round_function applied to
// the register's own value with the round constant round_const from the
// controller. The register output is the round key currently used by
// AddRoundKey: after the clock edge that ends the load it holds round key 0
// (the cipher key), and after each further edge the next round key, so it
// holds round key j while the controller shows RC[j+1].
//
// The mux, register and round function, and the port list, follow the
// published architecture; treating rst as a synchronous load is this design's
// choice.
module key_schedule
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,          // synchronous load of the cipher key
  input  block_t key,
  input  byte_t  round_const,
  output block_t round_key
);

  block_t key_reg, next_key, key_mux;

  key_round_function u_round_fn (
    .key_in (key_reg),
    .rcon   (round_const),
    .key_out(next_key)
  );

  // mux 2
  always_comb key_mux = rst ? key : next_key;

  always_ff @(posedge clk) key_reg <= key_mux;

  assign round_key = key_reg;

endmodule
