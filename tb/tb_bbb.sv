// tb_bbb: self-checking test of the basic building block.
//
// Runs one block with random but stable filters on the line, the tap and all
// nine node entries, drives random waves into both ends and compares both
// outputs, strobe by strobe, with a sample-level model of the block. The run
// is repeated for each switch setting: everything in, tap disconnected, node
// bypassed and line bypassed. With everything in, an impulse must also come
// back on out_b as an echo (node reflection and tap), which is counted.
module tb_bbb;
  import emu_pkg::*;
  import tb_ref_pkg::*;

  localparam int STAGES = 2;
  localparam int DEPTH  = 16;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  stb = 1'b0;
  bq_coef_t [STAGES-1:0] line_coef, tap_coef;
  bq_coef_t [2:0][2:0]   node_coef;
  logic [3:0]            line_delay, tap_delay;
  bbb_ctrl_t             ctrl;
  sample_t               in_f, out_f, in_b, out_b;

  int checks = 0, failures = 0;

  bbb #(.STAGES(STAGES), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .stb, .line_coef, .tap_coef, .node_coef, .line_delay,
    .tap_delay, .ctrl, .in_f, .out_f, .in_b, .out_b);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  function automatic bq_coef_t rnd_coef(real g);
    bq_coef_t c;
    c.b0 = q16(g * (0.4 + 0.5 * ($urandom_range(0, 100) / 100.0)));
    c.b1 = q16(g * (0.3 * ($urandom_range(0, 100) / 100.0) - 0.15));
    c.b2 = q16(g * (0.1 * ($urandom_range(0, 100) / 100.0)));
    c.a1 = q16(-0.9 + 0.6 * ($urandom_range(0, 100) / 100.0));
    c.a2 = q16(0.1 + 0.3 * ($urandom_range(0, 100) / 100.0));
    return c;
  endfunction

  // Reset the block, load a fresh configuration into block and model, and
  // run n strobes of random input (zero input after nz strobes).
  task automatic run(string name, bit lb, bit nb, bit te, int n, int nz, output int echoes);
    bbb_ref m;
    m = new(STAGES, DEPTH);
    rst_n = 1'b0;
    in_f = '0; in_b = '0;
    for (int k = 0; k < STAGES; k++) begin
      line_coef[k] = rnd_coef(1.0);
      tap_coef[k]  = rnd_coef(0.9);
      m.line_c[k] = line_coef[k];
      m.tap_c[k]  = tap_coef[k];
    end
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < 3; i++) begin
        node_coef[j][i] = rnd_coef((i == j) ? 0.3 : 0.6);
        m.node_c[j][i] = node_coef[j][i];
      end
    line_delay = 4'($urandom_range(0, 15));
    tap_delay  = 4'($urandom_range(0, 15));
    m.ld = int'(line_delay); m.td = int'(tap_delay);
    ctrl = '{tap_en: te, node_bypass: nb, line_bypass: lb};
    m.line_bypass = lb; m.node_bypass = nb; m.tap_en = te;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    echoes = 0;
    for (int s = 0; s < n; s++) begin
      longint vf, vb;
      vf = (s < nz) ? longint'($urandom_range(0, 1 << 28)) - (1 << 27) : 0;
      vb = (s < nz && s > 0) ? longint'($urandom_range(0, 1 << 28)) - (1 << 27) : 0;
      if (nz == 1) vb = 0;
      in_f = sample_t'(vf); in_b = sample_t'(vb);
      stb <= 1'b1;
      @(posedge clk); #1;
      stb <= 1'b0;
      repeat (4) @(posedge clk);
      #1;
      m.step(vf, vb);
      check({name, " out_f"}, out_f, m.out_f(vf));
      check({name, " out_b"}, out_b, m.out_b(vb));
      if (out_b != 0) echoes++;
    end
  endtask

  initial begin
    int e;
    line_coef = '0; tap_coef = '0; node_coef = '0;
    line_delay = '0; tap_delay = '0; ctrl = '0;
    in_f = '0; in_b = '0;
    // Impulse from the CPE side only: any out_b is an echo.
    run("echo", 0, 0, 1, 60, 1, e);
    checks++;
    if (e == 0) begin failures++; $display("FAIL no echo from node and tap"); end
    run("all in", 0, 0, 1, 150, 120, e);
    run("tap off", 0, 0, 0, 150, 120, e);
    run("node bypass", 0, 1, 0, 150, 120, e);
    run("line bypass", 1, 0, 1, 150, 120, e);
    run("all bypass", 1, 1, 0, 40, 40, e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
