// tb_shift_rows: ShiftRows. Checks the FIPS-197 Appendix B round-1 example,
// a state of distinct byte indices (so every byte's destination is seen) and
// 200 random states against the reference model.
module tb_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  shift_rows dut (.input_data(din), .output_data(dout));

  task automatic check(input logic [127:0] a, input logic [127:0] exp);
    din = a;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL shift_rows(%032h) = %032h, expected %032h", a, dout, exp);
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
    check(128'hd42711aee0bf98f1b8b45de51e415230, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    // byte k holds k: row r of column c moves to column (c - r) mod 4
    check(128'h000102030405060708090a0b0c0d0e0f, 128'h00050a0f04090e03080d02070c01060b);
    for (int i = 0; i < 200; i++) begin
      automatic logic [127:0] v = {$urandom, $urandom, $urandom, $urandom};
      check(v, ref_shift_rows(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
