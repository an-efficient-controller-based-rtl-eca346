// tb_reg_1: the state register. Drives a new random value before each rising
// edge and checks that q shows the value of d at the previous edge and does
// not change between edges.
module tb_reg_1;
  logic clk = 0;
  logic [127:0] d, q;
  int checks = 0, failures = 0;

  reg_1 dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      v = {$urandom, $urandom, $urandom, $urandom};
      d = v;
      @(posedge clk);
      #1;
      checks++;
      if (q !== v) begin
        failures++;
        $display("FAIL q = %032h, expected %032h", q, v);
      end
      @(negedge clk);
      d = ~v;        // changing d between edges must not reach q
      #2;
      checks++;
      if (q !== v) begin
        failures++;
        $display("FAIL q changed between edges");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
