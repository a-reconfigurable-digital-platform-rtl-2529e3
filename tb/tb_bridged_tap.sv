// tb_bridged_tap: self-checking test of the open-ended tap.
//
// An impulse through unity-gain stages must come back unchanged after
// 2 * (STAGES + delay + 1) samples (the output register shows it one strobe
// earlier). Random data through real filter stages is then compared with a
// line-section model whose far-end output is fed back into its far-end input.
module tb_bridged_tap;
  import emu_pkg::*;
  import tb_ref_pkg::*;

  localparam int STAGES = 2;
  localparam int DEPTH  = 16;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  stb = 1'b0;
  bq_coef_t [STAGES-1:0] coef;
  logic [3:0]            delay;
  sample_t               tap_in, tap_out;

  int checks = 0, failures = 0;

  bridged_tap #(.STAGES(STAGES), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .stb, .coef, .delay, .tap_in, .tap_out);

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

  task automatic strobe();
    stb <= 1'b1;
    @(posedge clk); #1;
    stb <= 1'b0;
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    line_ref  m;
    bq_coef_t c [];
    int       first, nonzero;
    c = new[STAGES];
    m = new(STAGES, DEPTH);
    for (int k = 0; k < STAGES; k++) coef[k] = '{b0: COEF_ONE, default: '0};
    delay = 4'd4;
    tap_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;

    first = -1; nonzero = 0;
    tap_in = 12345;
    for (int n = 0; n < 30; n++) begin
      strobe();
      tap_in = 0;
      if (tap_out != 0) nonzero++;
      if (tap_out == 12345 && first < 0) first = n;
    end
    check("echo returns after 2*(STAGES+delay+1) samples", first + 1, 2 * (STAGES + 4 + 1));
    check("exactly one echo", nonzero, 1);

    coef[0] = '{b0: q16(0.6), b1: q16(0.2), b2: q16(-0.1), a1: q16(-0.9), a2: q16(0.3)};
    coef[1] = '{b0: q16(0.9), b1: q16(-0.2), b2: q16(0.05), a1: q16(-0.5), a2: q16(0.1)};
    delay = 4'd2;
    for (int k = 0; k < STAGES; k++) c[k] = coef[k];
    for (int n = 0; n < 200; n++) begin
      longint v;
      v = (n < 150) ? longint'($urandom_range(0, 1 << 28)) - (1 << 27) : 0;
      tap_in = sample_t'(v);
      strobe();
      m.step(c, 2, v, m.a_out);
      check("tap output", tap_out, m.b_out());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
