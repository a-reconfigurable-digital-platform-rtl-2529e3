// tb_biquad: self-checking test of the bidirectional second-order section.
//
// Drives both channels with random samples at one sample every five clocks,
// each channel with its own coefficient set, and compares every output with a
// plain transposed direct form II model computed in 64-bit integers, with the
// output truncated to 32 bits (arithmetic shift) and saturated. It also
// checks the schedule: channel 0 must update on the first clock edge after the
// edge that captures the input and channel 1 on the third, so that a sample is
// finished within the five-cycle period. A final phase drives
// full-scale input through a gain near 2 to check saturation.
module tb_biquad;
  import emu_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     stb = 1'b0;
  bq_coef_t coef [2];
  sample_t  x [2];
  sample_t  y [2];

  int checks = 0, failures = 0;

  biquad #(.NCH(2)) dut (.clk, .rst_n, .stb, .coef, .x, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  longint rs1 [2], rs2 [2], ry [2];

  function automatic longint ref_scale(longint acc);
    longint r;
    r = acc >>> 16;
    if (r > 64'sd2147483647) r = 64'sd2147483647;
    if (r < -64'sd2147483648) r = -64'sd2147483648;
    return r;
  endfunction

  task automatic ref_step(int c, longint xv);
    longint b0, b1, b2, a1, a2, yv;
    b0 = longint'(coef[c].b0); b1 = longint'(coef[c].b1); b2 = longint'(coef[c].b2);
    a1 = longint'(coef[c].a1); a2 = longint'(coef[c].a2);
    yv = ref_scale(b0 * xv + rs1[c]);
    rs1[c] = b1 * xv - a1 * yv + rs2[c];
    rs2[c] = b2 * xv - a2 * yv;
    ry[c] = yv;
  endtask

  function automatic coef_t q16(real v);
    return coef_t'($rtoi(v * 65536.0));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One sample period: strobe, then verify the timing and value of each output.
  task automatic sample(longint x0, longint x1);
    longint old0, old1;
    old0 = ry[0]; old1 = ry[1];
    x[0] = sample_t'(x0); x[1] = sample_t'(x1);
    stb <= 1'b1;
    @(posedge clk); #1;
    stb <= 1'b0;
    ref_step(0, x0); ref_step(1, x1);
    check("ch0 held at the capture edge", y[0], old0);
    @(posedge clk); #1;
    check("ch0 value one edge after capture", y[0], ry[0]);
    check("ch1 held one edge after capture", y[1], old1);
    @(posedge clk); #1;
    check("ch1 held two edges after capture", y[1], old1);
    @(posedge clk); #1;
    check("ch1 value three edges after capture", y[1], ry[1]);
    @(posedge clk); #1;
  endtask

  initial begin
    // Channel 0: low-pass section; channel 1: resonant section with a1 < -1.
    coef[0] = '{b0: q16(0.20), b1: q16(0.40), b2: q16(0.20), a1: q16(-0.60), a2: q16(0.20)};
    coef[1] = '{b0: q16(0.95), b1: q16(-1.30), b2: q16(0.55), a1: q16(-1.50), a2: q16(0.81)};
    x[0] = '0; x[1] = '0;
    for (int c = 0; c < 2; c++) begin rs1[c] = 0; rs2[c] = 0; ry[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    // Impulse, then random data.
    sample(64'sd100000000, -64'sd50000000);
    for (int i = 0; i < 40; i++) sample(0, 0);
    for (int i = 0; i < 300; i++)
      sample(longint'($signed($urandom_range(0, 1 << 30))) - (1 << 29),
             longint'($signed($urandom_range(0, 1 << 30))) - (1 << 29));
    // Saturation: gain close to 2 with a full-scale input.
    coef[0] = '{b0: q16(1.99), b1: '0, b2: '0, a1: '0, a2: '0};
    for (int i = 0; i < 4; i++) sample(64'sd2000000000, -64'sd2000000000);
    check("saturated positive", y[0], 64'sd2147483647);
    sample(-64'sd2000000000, 0);
    check("saturated negative", y[0], -64'sd2147483648);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
