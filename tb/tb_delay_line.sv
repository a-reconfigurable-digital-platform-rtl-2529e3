// tb_delay_line: self-checking test of the configurable delay line.
//
// Streams a counting pattern through a small buffer at several delays,
// including zero and the maximum, and checks each output against the input
// that was presented `delay` strobes earlier. It also checks that the output
// is zero before the buffer has been filled and that a change of delay takes
// effect on the next strobe.
module tb_delay_line;
  import emu_pkg::*;

  localparam int DEPTH = 16;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       stb = 1'b0;
  logic [3:0] delay;
  sample_t    din, dout;

  int checks = 0, failures = 0;
  sample_t hist [$];   // every input presented, in order

  delay_line #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .stb, .delay, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // One strobe with input v; then compare with the expected output.
  task automatic sample(sample_t v);
    int n;
    din = v;
    stb <= 1'b1;
    @(posedge clk); #1;
    stb <= 1'b0;
    hist.push_back(v);
    n = hist.size() - 1 - int'(delay);
    check($sformatf("delay %0d output", delay), dout, (n >= 0) ? hist[n] : 0);
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    delay = 4'd5;
    din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 40; i++) sample(sample_t'(1000 + i));
    delay = 4'd0;
    for (int i = 0; i < 10; i++) sample(sample_t'(-7 * i));
    delay = 4'd15;
    for (int i = 0; i < 40; i++) sample(sample_t'($urandom));
    delay = 4'd1;
    for (int i = 0; i < 10; i++) sample(sample_t'($urandom));
    // Between strobes the output must hold.
    begin
      sample_t held;
      held = dout;
      din = 32'h5555_aaaa;
      repeat (3) @(posedge clk);
      check("output held between strobes", dout, held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
