// tb_add_round_key: AddRoundKey. Checks the FIPS-197 Appendix B initial
// AddRoundKey and 200 random state/key pairs.
module tb_add_round_key;
  logic [127:0] a, b, y;
  int checks = 0, failures = 0;

  add_round_key dut (.input1(a), .input2(b), .output_data(y));

  task automatic check(input logic [127:0] s, input logic [127:0] k, input logic [127:0] exp);
    a = s;
    b = k;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %032h ^ %032h = %032h, expected %032h", s, k, y, exp);
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
    check(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int i = 0; i < 200; i++) begin
      automatic logic [127:0] s = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      logic [127:0] e;
      for (int j = 0; j < 128; j++) e[j] = (s[j] != k[j]);
      check(s, k, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
