// tb_aes_sbox: exhaustive check of the S-box ROM. All 256 inputs are compared
// with the reference model, and a few entries with published S-box values
// (00->63, 53->ED, AF->79, FF->16).
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  task automatic check(input logic [7:0] a, input logic [7:0] exp);
    in_byte = a;
    #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", a, out_byte, exp);
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
    check(8'h00, 8'h63);
    check(8'h53, 8'hED);
    check(8'hAF, 8'h79);
    check(8'hFF, 8'h16);
    for (int a = 0; a < 256; a++) check(8'(a), ref_sbox(8'(a)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
