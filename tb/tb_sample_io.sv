// tb_sample_io: self-checking test of the converter interface.
//
// Checks that ADC codes (including both extremes) arrive sign-extended and
// shifted into the 32-bit word one strobe later, that outgoing samples are
// rounded to the nearest converter step (halves up), clipped to the 14-bit
// range with the clip flag set, and that nothing changes between strobes.
module tb_sample_io;
  import emu_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        stb = 1'b0;
  logic [13:0] adc_code, dac_code;
  sample_t     rx, tx;
  logic        dac_clip;

  int checks = 0, failures = 0;

  sample_io dut (.clk, .rst_n, .stb, .adc_code, .rx, .tx, .dac_code, .dac_clip);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  task automatic sample(longint code, longint t);
    longint exp_dac;
    bit     exp_clip;
    adc_code = 14'(code);
    tx = sample_t'(t);
    exp_dac = dac_ref(t, exp_clip);
    stb <= 1'b1;
    @(posedge clk); #1;
    stb <= 1'b0;
    check("rx word", rx, code * 65536);
    check("dac code", $signed(dac_code), exp_dac);
    check("clip flag", dac_clip, exp_clip);
    adc_code = 14'($urandom);
    tx = sample_t'($urandom);
    repeat (4) @(posedge clk);
    #1;
    check("rx held between strobes", rx, code * 65536);
  endtask

  initial begin
    adc_code = '0; tx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    sample(8191, 0);
    sample(-8192, 32768);            // exactly half a step: rounds up to 1
    sample(0, 32767);                // just below half: rounds to 0
    sample(1, -32768);               // -0.5 step rounds up to 0
    sample(-1, -32769);              // just below -0.5 rounds to -1
    sample(100, 64'sd536805376);     // 8191 steps: largest code, no clip
    sample(100, 64'sd536838144);     // 8191.5 steps: rounds to 8192, clipped
    sample(-5, -64'sd536870912);     // -8192 steps: smallest code
    sample(7, -64'sd2147483648);     // far below: clipped
    for (int i = 0; i < 300; i++)
      sample(longint'($urandom_range(0, 16383)) - 8192, longint'($signed($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
