// tb_key_schedule: key mux and key register. Loads a cipher key with rst
// high, then drives the round constants 01..36 one per clock as the
// controller would and checks that round_key steps through round keys 0..10
// (FIPS-197 Appendix A.1 for the first key, the reference model for 20
// random keys). Also checks that raising rst again reloads the key at once.
module tb_key_schedule;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [127:0] key, round_key;
  logic [7:0]   round_const;
  int checks = 0, failures = 0;

  key_schedule dut (.clk(clk), .rst(rst), .key(key), .round_const(round_const),
                    .round_key(round_key));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key(input logic [127:0] k, input logic [127:0] last, input logic use_last);
    logic [127:0] exp = k;
    @(negedge clk);
    rst = 1;
    key = k;
    round_const = $urandom;   // ignored while loading
    @(negedge clk);
    rst = 0;
    key = ~k;                 // the key input must not matter after the load
    for (int j = 1; j <= 10; j++) begin
      checks++;
      if (round_key !== exp) begin
        failures++;
        $display("FAIL round key %0d = %032h, expected %032h", j - 1, round_key, exp);
      end
      round_const = ref_rcon(j);
      exp = ref_next_key(exp, j);
      @(negedge clk);
    end
    checks++;
    if (round_key !== exp || (use_last && round_key !== last)) begin
      failures++;
      $display("FAIL round key 10 = %032h, expected %032h", round_key, exp);
    end
  endtask

  initial begin
    round_const = 0;
    key = 0;
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, 1);
    for (int i = 0; i < 20; i++)
      run_key({$urandom, $urandom, $urandom, $urandom}, '0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
