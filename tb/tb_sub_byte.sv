// tb_sub_byte: SubBytes on the whole state. Checks the first-round SubBytes
// of the FIPS-197 Appendix B example and 200 random states against the
// reference model.
module tb_sub_byte;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  sub_byte dut (.input_data(din), .output_data(dout));

  task automatic check(input logic [127:0] a, input logic [127:0] exp);
    din = a;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL sub_byte(%032h) = %032h, expected %032h", a, dout, exp);
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
    check(128'h193de3bea0f4e22b9ac68d2ae9f84808, 128'hd42711aee0bf98f1b8b45de51e415230);
    for (int i = 0; i < 200; i++) begin
      automatic logic [127:0] v = {$urandom, $urandom, $urandom, $urandom};
      check(v, ref_sub_bytes(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
