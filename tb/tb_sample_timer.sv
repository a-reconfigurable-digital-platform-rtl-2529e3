// tb_sample_timer: checks that the strobe comes on the first cycle after
// reset and then exactly once every DIV cycles (5 for 160 MHz / 32 MSPS),
// and that a different divider is honoured as well.
module tb_sample_timer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic stb5, stb3;

  int checks = 0, failures = 0;

  sample_timer              dut5 (.clk, .rst_n, .stb(stb5));
  sample_timer #(.DIV(3))   dut3 (.clk, .rst_n, .stb(stb3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int n5 = 0, n3 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      check("strobe every 5 cycles", stb5, (c % 5) == 0);
      check("strobe every 3 cycles", stb3, (c % 3) == 0);
      n5 += stb5; n3 += stb3;
      @(posedge clk); #1;
    end
    check("strobes in 300 cycles at DIV 5", n5, 60);
    check("strobes in 300 cycles at DIV 3", n3, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
