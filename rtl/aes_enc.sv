// aes_enc: iterative AES-128 encryption core, one round per clock cycle.
//
// Datapath: a 128-bit state register (reg_1) feeds AddRoundKey together with
// the round key held in key_schedule. The XOR result goes through SubBytes,
// ShiftRows and MixColumns; a feedback multiplexer returns the MixColumns
// result, or the ShiftRows result in the final round, to the input
// multiplexer of the state register, which takes the plaintext instead while
// rst is high. The controller supplies the round constant to key_schedule,
// flags the final round and raises done.
//
// Timing: hold rst high for at least one rising clock edge with plaintext and
// key valid. The edge ends the load: state = plaintext, key register = key,
// rcon = 01. With rst low, every further edge performs one round; after the
// 10th edge, done is high for one cycle and ciphertext (state XOR round key 10)
// is valid during that cycle. The loop is not stopped afterwards, so the
// ciphertext must be captured while done is high. A new block can be loaded
// at any time by raising rst again; one block takes 11 clocks including load.
//
// ciphertext is always the AddRoundKey output; it only means the ciphertext
// while done is high. Byte order on all buses is FIPS-197 order (first byte in
// bits 127:120).
//
// The blocks, the three multiplexers, the tap of the ciphertext at the XOR
// and the final-round bypass follow the published architecture; rst as a
// synchronous load, the byte order and the absence of any hold after done are
// this design's choices. The description also speaks of pipelining and of
// one block per clock, which the drawn loop does not have; the loop is built.
module aes_enc
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  block_t plaintext,
  input  block_t key,
  output block_t ciphertext,
  output logic   done
);

  block_t state_q, reg_input, ark_out, sb_out, sr_out, mc_out, feedback;
  block_t round_key;
  byte_t  rcon;
  logic   is_final_round;

  // mux 1: plaintext on load, round result otherwise
  always_comb reg_input = rst ? plaintext : feedback;

  reg_1 #(.WIDTH(128)) reg_inst (
    .clk(clk),
    .d  (reg_input),
    .q  (state_q)
  );

  add_round_key add_round_key_inst (
    .input1     (state_q),
    .input2     (round_key),
    .output_data(ark_out)
  );

  sub_byte sub_byte_inst (
    .input_data (ark_out),
    .output_data(sb_out)
  );

  shift_rows shift_rows_inst (
    .input_data (sb_out),
    .output_data(sr_out)
  );

  mix_columns mix_columns_inst (
    .input_data (sr_out),
    .output_data(mc_out)
  );

  // mux 3: the final round leaves out MixColumns
  always_comb feedback = is_final_round ? sr_out : mc_out;

  key_schedule key_schedule_inst (
    .clk        (clk),
    .rst        (rst),
    .key        (key),
    .round_const(rcon),
    .round_key  (round_key)
  );

  controller controller_inst (
    .clk           (clk),
    .rst           (rst),
    .rcon          (rcon),
    .done          (done),
    .is_final_round(is_final_round)
  );

  assign ciphertext = ark_out;

endmodule
