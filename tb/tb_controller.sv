// tb_controller: round-constant controller. After a load it must show
// 01 02 04 08 10 20 40 80 1B 36 6C on successive clocks, with is_final_round
// high exactly at 36 (the 10th value) and done high exactly at 6C, one clock
// later (10 clocks after the load edge). It must reload 01 whenever rst is
// high, also in the middle of a sequence.
module tb_controller;
  logic clk = 0, rst = 1;
  logic [7:0] rcon;
  logic done, is_final_round;
  int checks = 0, failures = 0;

  localparam logic [7:0] EXP [11] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20,
                                      8'h40, 8'h80, 8'h1B, 8'h36, 8'h6C};

  controller dut (.clk(clk), .rst(rst), .rcon(rcon), .done(done),
                  .is_final_round(is_final_round));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_step(input int i);
    checks++;
    if (rcon !== EXP[i] || is_final_round !== (i == 9) || done !== (i == 10)) begin
      failures++;
      $display("FAIL step %0d: rcon=%02h final=%b done=%b, expected %02h %b %b",
               i, rcon, is_final_round, done, EXP[i], i == 9, i == 10);
    end
  endtask

  initial begin
    for (int run = 0; run < 5; run++) begin
      int stop = (run == 2) ? 4 : 11;   // run 2 is cut short by a reload
      @(negedge clk);
      rst = 1;
      @(negedge clk);
      rst = 0;
      for (int i = 0; i < stop; i++) begin
        expect_step(i);
        @(negedge clk);
      end
      if (stop == 11) begin
        // the register keeps doubling: 6C -> D8, done falls again
        checks++;
        if (done !== 1'b0 || rcon !== 8'hD8) begin
          failures++;
          $display("FAIL after done: rcon=%02h done=%b", rcon, done);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
