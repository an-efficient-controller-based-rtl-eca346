// tb_mix_columns: MixColumns. Checks the FIPS-197 Appendix B round-1 example,
// the column db 13 53 45 -> 8e 4d a1 bc, and 200 random states against the
// reference model.
module tb_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  mix_columns dut (.input_data(din), .output_data(dout));

  task automatic check(input logic [127:0] a, input logic [127:0] exp);
    din = a;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL mix_columns(%032h) = %032h, expected %032h", a, dout, exp);
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
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5, 128'h046681e5e0cb199a48f8d37a2806264c);
    check(128'hdb135345f20a225c01010101c6c6c6c6, 128'h8e4da1bc9fdc589d01010101c6c6c6c6);
    for (int i = 0; i < 200; i++) begin
      automatic logic [127:0] v = {$urandom, $urandom, $urandom, $urandom};
      check(v, ref_mix_columns(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
