// tb_line_section: self-checking test of the bidirectional cable section.
//
// First an impulse through unity-gain stages checks the latency in both
// directions (STAGES + delay strobes until the output register shows it).
// Then random data in both directions through resonant stages is compared,
// strobe by strobe, with a sample-level model of filters and delay lines.
module tb_line_section;
  import emu_pkg::*;
  import tb_ref_pkg::*;

  localparam int STAGES = 2;
  localparam int DEPTH  = 16;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  stb = 1'b0;
  bq_coef_t [STAGES-1:0] coef;
  logic [3:0]            delay;
  sample_t               a_in, a_out, b_in, b_out;

  int checks = 0, failures = 0;

  line_section #(.STAGES(STAGES), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .stb, .coef, .delay, .a_in, .a_out, .b_in, .b_out);

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
    int       first_a, first_b;
    c = new[STAGES];
    m = new(STAGES, DEPTH);
    for (int k = 0; k < STAGES; k++) begin
      coef[k] = '{b0: COEF_ONE, default: '0};
      c[k] = coef[k];
    end
    delay = 4'd3;
    a_in = '0; b_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;

    // Latency: impulse in both directions at strobe 0.
    first_a = -1; first_b = -1;
    a_in = 1000; b_in = -2000;
    for (int n = 0; n < 12; n++) begin
      strobe();
      a_in = 0; b_in = 0;
      if (a_out == 1000 && first_a < 0) first_a = n;
      if (b_out == -2000 && first_b < 0) first_b = n;
    end
    check("forward latency", first_a, STAGES + 3);
    check("backward latency", first_b, STAGES + 3);

    // Random data through resonant stages, compared with the model.
    coef[0] = '{b0: q16(0.7), b1: q16(-0.4), b2: q16(0.1), a1: q16(-1.2), a2: q16(0.5)};
    coef[1] = '{b0: q16(0.3), b1: q16(0.5), b2: q16(0.3), a1: q16(0.4), a2: q16(0.3)};
    delay = 4'd6;
    for (int k = 0; k < STAGES; k++) c[k] = coef[k];
    // Let the section settle to zero first, then run both together.
    for (int n = 0; n < 30; n++) strobe();
    for (int n = 0; n < 200; n++) begin
      longint av, bv;
      av = longint'($urandom_range(0, 1 << 28)) - (1 << 27);
      bv = longint'($urandom_range(0, 1 << 28)) - (1 << 27);
      a_in = sample_t'(av); b_in = sample_t'(bv);
      strobe();
      m.step(c, 6, av, bv);
      check("forward output", a_out, m.a_out);
      check("backward output", b_out, m.b_out());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
