// tb_aes_enc: end-to-end test of the AES-128 encryption core at its default
// parameters.
//
// Each block is loaded by holding rst high for one or more clocks; the test
// then counts clocks until done and requires exactly 10, requires done to be
// a one-cycle pulse, and compares the ciphertext seen while done is high with
// the FIPS-197 examples (Appendix B and Appendix C.1) and with the reference
// model for random plaintext/key pairs. It also reloads the core in the middle
// of an encryption, which must abandon the old block and produce the new
// block's ciphertext. It counts how often each mechanism occurred: load
// through the input multiplexer, full rounds fed back through MixColumns,
// final rounds that bypass MixColumns, done pulses and mid-operation reloads;
// one that never occurred counts as a failure.
module tb_aes_enc;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [127:0] plaintext, key, ciphertext;
  logic done;
  int checks = 0, failures = 0;
  int n_load = 0, n_full_round = 0, n_final_round = 0, n_done = 0, n_reload = 0;

  aes_enc dut (.clk(clk), .rst(rst), .plaintext(plaintext), .key(key),
               .ciphertext(ciphertext), .done(done));

  always #5 clk = ~clk;

  // mechanism counters, sampled at each rising edge
  always @(posedge clk) begin
    if (rst) n_load++;
    else if (dut.is_final_round) n_final_round++;
    else if (!done) n_full_round++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Load pt/key (rst high for load_cycles clocks) and wait for done.
  task automatic encrypt(input logic [127:0] pt, input logic [127:0] k,
                         input logic [127:0] exp, input int load_cycles);
    int cycles = 0;
    @(negedge clk);
    rst = 1;
    plaintext = pt;
    key = k;
    repeat (load_cycles) @(negedge clk);
    rst = 0;
    plaintext = ~pt;       // inputs must not matter once loaded
    key = ~k;
    while (!done && cycles < 20) begin
      @(negedge clk);
      cycles++;
    end
    check($sformatf("latency %0d clocks, expected 10", cycles), cycles == 10);
    check($sformatf("ciphertext %032h, expected %032h", ciphertext, exp), ciphertext === exp);
    if (done) n_done++;
    @(negedge clk);
    check("done lasts one cycle", done === 1'b0);
  endtask

  initial begin
    plaintext = '0;
    key = '0;
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            128'h3925841d02dc09fbdc118597196a0b32, 3);
    check("reference model agrees with FIPS-197",
          ref_encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c)
          === 128'h3925841d02dc09fbdc118597196a0b32);

    // reload in the middle of an encryption
    for (int i = 0; i < 3; i++) begin
      automatic logic [127:0] pt = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] k  = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      rst = 1;
      plaintext = ~pt;
      key = k ^ 128'h1;
      @(negedge clk);
      rst = 0;
      repeat (2 + i * 3) begin
        @(negedge clk);
        check("no done before round 10", done === 1'b0);
      end
      n_reload++;
      encrypt(pt, k, ref_encrypt(pt, k), 1);
    end

    for (int i = 0; i < 40; i++) begin
      automatic logic [127:0] pt = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] k  = {$urandom, $urandom, $urandom, $urandom};
      encrypt(pt, k, ref_encrypt(pt, k), 1 + (i % 2));
    end

    $display("mechanisms: loads=%0d full_rounds=%0d final_rounds=%0d done=%0d reloads=%0d",
             n_load, n_full_round, n_final_round, n_done, n_reload);
    check("load occurred", n_load > 0);
    check("full round occurred", n_full_round > 0);
    check("final round occurred", n_final_round > 0);
    check("done occurred", n_done > 0);
    check("reload occurred", n_reload > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
