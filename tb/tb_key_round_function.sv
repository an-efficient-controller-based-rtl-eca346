// tb_key_round_function: one key-expansion step. Chains the ten steps from
// the FIPS-197 Appendix A.1 cipher key and compares each round key with the
// published expansion, then checks 100 random keys and round constants
// against the reference model.
module tb_key_round_function;
  import aes_ref_pkg::*;

  logic [127:0] key_in, key_out;
  logic [7:0]   rcon;
  int checks = 0, failures = 0;

  localparam logic [127:0] FIPS_KEYS [11] = '{
    128'h2b7e151628aed2a6abf7158809cf4f3c, 128'ha0fafe1788542cb123a339392a6c7605,
    128'hf2c295f27a96b9435935807a7359f67f, 128'h3d80477d4716fe3e1e237e446d7a883b,
    128'hef44a541a8525b7fb671253bdb0bad00, 128'hd4d1c6f87c839d87caf2b8bc11f915bc,
    128'h6d88a37a110b3efddbf98641ca0093fd, 128'h4e54f70e5f5fc9f384a64fb24ea6dc4f,
    128'head27321b58dbad2312bf5607f8d292f, 128'hac7766f319fadc2128d12941575c006e,
    128'hd014f9a8c9ee2589e13f0cc8b6630ca6};
  localparam logic [7:0] RC [1:10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                       8'h20, 8'h40, 8'h80, 8'h1B, 8'h36};

  key_round_function dut (.key_in(key_in), .rcon(rcon), .key_out(key_out));

  task automatic check(input logic [127:0] k, input logic [7:0] rc, input logic [127:0] exp);
    key_in = k;
    rcon   = rc;
    #1;
    checks++;
    if (key_out !== exp) begin
      failures++;
      $display("FAIL next(%032h, %02h) = %032h, expected %032h", k, rc, key_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 1; j <= 10; j++) check(FIPS_KEYS[j-1], RC[j], FIPS_KEYS[j]);
    for (int i = 0; i < 100; i++) begin
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      automatic int j = 1 + ($urandom % 10);
      check(k, ref_rcon(j), ref_next_key(k, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
