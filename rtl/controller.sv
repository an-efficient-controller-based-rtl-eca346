// controller: round control of the encryption core built from a multiplexer,
// an 8-bit register and a GF(2^8) multiplier instead of a state machine.
//
// The register holds the current round constant rcon. While rst is high the
// multiplexer loads RCON_INIT (0x01); otherwise it loads rcon multiplied by x
// modulo x^8+x^4+x^3+x+1 (xtime). The register therefore steps through
// 01 02 04 08 10 20 40 80 1B 36, the round constants of rounds 1..10, and then
// 6C. Two comparators decode the register: is_final_round is high while it
// holds RCON_FINAL (0x36, round 10, in which MixColumns is skipped) and done
// is high while it holds RCON_DONE (0x6C, the clock after round 10, when the
// ciphertext is at the core's output). Nothing holds the register after done:
// it keeps doubling, so done is a one-cycle pulse per load.
//
// The multiplexer/register/multiplier structure and the constants 0x01, 0x36
// and 0x6C follow the published controller; reading the multiplier as
// 'times x' and leaving the register free-running after done are this
// design's choices.
module controller
  import aes_pkg::*;
#(
  parameter byte_t RCON_INIT  = 8'h01,   // RC[1]
  parameter byte_t RCON_FINAL = 8'h36,   // RC[10], last round
  parameter byte_t RCON_DONE  = 8'h6C    // one doubling past RC[10]
) (
  input  logic  clk,
  input  logic  rst,
  output byte_t rcon,
  output logic  done,
  output logic  is_final_round
);

  byte_t rcon_next;

  always_comb rcon_next = rst ? RCON_INIT : xtime(rcon);

  always_ff @(posedge clk) rcon <= rcon_next;

  assign is_final_round = (rcon == RCON_FINAL);
  assign done           = (rcon == RCON_DONE);

endmodule
