// tb_dsl_loop_emulator: end-to-end test of the loop emulator core at its
// default size (3 building blocks, 2 stages per section, 256-sample delays).
//
// A checker process runs a sample-level model of the whole core (converter
// registers, every building block, configuration commit) next to the design
// and compares both DAC codes and clip flags on every sample strobe. The
// configuration is written through the host port exactly as a host would.
// Scenarios, in order:
//   1. reset state: the core is a transparent connection; an impulse from
//      either side must reach the other side after 1 + 3 * 3 = 10 samples
//   2. test case A: 250 ft + 3000 ft, one node, random traffic both ways
//   3. VDSL 4 with a 4500 ft last section: three sections, two nodes with
//      bridged taps; an impulse from the CPE side must echo back from the
//      first node after 8 samples (250 ns, inside the 257 ns the 150 ft
//      first section leaves for digital processing), then random traffic
//   4. coefficient change on a running loop (time-varying line)
//   5. high-gain loop driven at full scale: DAC clipping
// Counters record that each mechanism occurred: node reflection, tap echo,
// line bypass, node bypass, long delay line, configuration commit, clipping.
// Line and node coefficients are plausible low-pass and junction values, not
// fitted cable models.
module tb_dsl_loop_emulator;
  import emu_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 3, S = 2, DEPTH = 256;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        conv_stb;
  logic [13:0] adc_cpe = '0, adc_co = '0;
  logic [13:0] dac_cpe, dac_co;
  logic        clip_cpe, clip_co;
  logic        cfg_we = 1'b0;
  logic [8:0]  cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic        cfg_commit = 1'b0;
  logic        cfg_pending;

  dsl_loop_emulator dut (
    .clk, .rst_n, .conv_stb, .adc_cpe, .adc_co, .dac_cpe, .dac_co,
    .clip_cpe, .clip_co, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_commit,
    .cfg_pending);

  always #3.125ns clk = ~clk;  // 160 MHz

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  bbb_ref   m [N];
  // Host-side copy of the written (shadow) configuration.
  bq_coef_t sh_line [N][S];
  bq_coef_t sh_tap  [N][S];
  bq_coef_t sh_node [N][3][3];
  int       sh_ld [N], sh_td [N];
  bit       sh_lb [N], sh_nb [N], sh_te [N];

  longint   rx_cpe = 0, rx_co = 0;
  longint   exp_dac_cpe = 0, exp_dac_co = 0;
  bit       exp_clip_cpe = 0, exp_clip_co = 0;

  // Stimulus selection.
  typedef enum {STIM_ZERO, STIM_RANDOM, STIM_IMP_CPE, STIM_IMP_CO, STIM_FULL} stim_t;
  stim_t stim = STIM_ZERO;
  int    amp = 4000;
  int    strobes = 0;

  // Mechanism counters.
  int n_reflect = 0, n_tap = 0, n_lbyp = 0, n_nbyp = 0, n_long = 0;
  int n_commit = 0, n_clip = 0;

  initial begin
    for (int b = 0; b < N; b++) begin
      m[b] = new(S, DEPTH);
      for (int k = 0; k < S; k++) begin
        sh_line[b][k] = '{b0: COEF_ONE, default: '0};
        sh_tap[b][k]  = '0;
      end
      for (int j = 0; j < 3; j++) for (int i = 0; i < 3; i++) sh_node[b][j][i] = '0;
      sh_ld[b] = 0; sh_td[b] = 0; sh_lb[b] = 0; sh_nb[b] = 1; sh_te[b] = 0;
    end
  end

  // One model strobe. commit_now: the design copies its shadow configuration
  // on this strobe; coefficients apply to this strobe's filter work, while
  // routing and delays still use the old values for this strobe's capture.
  function automatic void model_strobe(longint a_cpe, longint a_co, bit commit_now);
    longint f [N+1];
    longint bw [N+1];
    f[0] = rx_cpe;
    for (int b = 0; b < N; b++) f[b+1] = m[b].out_f(f[b]);
    bw[N] = rx_co;
    for (int b = N - 1; b >= 0; b--) bw[b] = m[b].out_b(bw[b+1]);
    exp_dac_co  = dac_ref(f[N], exp_clip_co);
    exp_dac_cpe = dac_ref(bw[0], exp_clip_cpe);
    rx_cpe = a_cpe <<< CONV_SHIFT;
    rx_co  = a_co <<< CONV_SHIFT;
    if (commit_now)
      for (int b = 0; b < N; b++) begin
        for (int k = 0; k < S; k++) begin
          m[b].line_c[k] = sh_line[b][k];
          m[b].tap_c[k]  = sh_tap[b][k];
        end
        for (int j = 0; j < 3; j++) for (int i = 0; i < 3; i++) m[b].node_c[j][i] = sh_node[b][j][i];
      end
    for (int b = 0; b < N; b++) m[b].step(f[b], bw[b+1]);
    if (commit_now)
      for (int b = 0; b < N; b++) begin
        m[b].ld = sh_ld[b]; m[b].td = sh_td[b];
        m[b].line_bypass = sh_lb[b]; m[b].node_bypass = sh_nb[b]; m[b].tap_en = sh_te[b];
      end
  endfunction

  function automatic longint rnd_code(int a);
    return longint'($urandom_range(0, 2 * a)) - a;
  endfunction

  // Checker: runs on the falling edge before every sampling edge.
  always @(negedge clk) begin
    if (rst_n && conv_stb) begin
      longint a_cpe, a_co;
      check("dac_co",   $signed(dac_co),  exp_dac_co);
      check("dac_cpe",  $signed(dac_cpe), exp_dac_cpe);
      check("clip_co",  clip_co,  exp_clip_co);
      check("clip_cpe", clip_cpe, exp_clip_cpe);
      if (clip_co || clip_cpe) n_clip++;
      case (stim)
        STIM_RANDOM:  begin a_cpe = rnd_code(amp); a_co = rnd_code(amp); end
        STIM_IMP_CPE: begin a_cpe = amp; a_co = 0; stim = STIM_ZERO; end
        STIM_IMP_CO:  begin a_cpe = 0; a_co = amp; stim = STIM_ZERO; end
        STIM_FULL:    begin a_cpe = (strobes % 64 < 32) ? 8191 : -8192; a_co = 0; end
        default:      begin a_cpe = 0; a_co = 0; end
      endcase
      adc_cpe = 14'(a_cpe);
      adc_co  = 14'(a_co);
      if (cfg_pending) n_commit++;
      model_strobe(a_cpe, a_co, cfg_pending);
      strobes++;
      // Mechanism observation inside the design.
      if (dut.g_bbb[0].u_bbb.u_node.h[0][0] != 0 || dut.g_bbb[1].u_bbb.u_node.h[0][0] != 0) n_reflect++;
      if ((dut.ctrl[0].tap_en && dut.g_bbb[0].u_bbb.tap_ret != 0) ||
          (dut.ctrl[1].tap_en && dut.g_bbb[1].u_bbb.tap_ret != 0)) n_tap++;
      for (int b = 0; b < N; b++) begin
        if (dut.ctrl[b].line_bypass && dut.f[b] != 0) n_lbyp++;
        if (dut.ctrl[b].node_bypass && dut.f[b+1] != 0) n_nbyp++;
      end
      if (dut.line_delay[2] >= 200 && dut.g_bbb[2].u_bbb.ls_a_out != 0) n_long++;
    end
  end

  // ---------------------------------------------------------------- host
  task automatic wr(int b, int off, logic [31:0] v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = 9'(b * 128 + off); cfg_wdata = v;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic set_line(int b, int k, bq_coef_t c);
    sh_line[b][k] = c;
    wr(b, 5 * k + 0, 32'(c.b0)); wr(b, 5 * k + 1, 32'(c.b1)); wr(b, 5 * k + 2, 32'(c.b2));
    wr(b, 5 * k + 3, 32'(c.a1)); wr(b, 5 * k + 4, 32'(c.a2));
  endtask

  task automatic set_tap(int b, int k, bq_coef_t c);
    sh_tap[b][k] = c;
    wr(b, 32 + 5 * k + 0, 32'(c.b0)); wr(b, 32 + 5 * k + 1, 32'(c.b1)); wr(b, 32 + 5 * k + 2, 32'(c.b2));
    wr(b, 32 + 5 * k + 3, 32'(c.a1)); wr(b, 32 + 5 * k + 4, 32'(c.a2));
  endtask

  task automatic set_node(int b, int j, int i, bq_coef_t c);
    int o;
    o = 64 + 5 * (3 * j + i);
    sh_node[b][j][i] = c;
    wr(b, o + 0, 32'(c.b0)); wr(b, o + 1, 32'(c.b1)); wr(b, o + 2, 32'(c.b2));
    wr(b, o + 3, 32'(c.a1)); wr(b, o + 4, 32'(c.a2));
  endtask

  task automatic set_misc(int b, int ld, int td, bit lb, bit nb, bit te);
    sh_ld[b] = ld; sh_td[b] = td; sh_lb[b] = lb; sh_nb[b] = nb; sh_te[b] = te;
    wr(b, 'h70, 32'(ld));
    wr(b, 'h71, 32'(td));
    wr(b, 'h72, {29'd0, te, nb, lb});
  endtask

  task automatic commit_cfg();
    @(negedge clk);
    cfg_commit = 1'b1;
    @(negedge clk);
    cfg_commit = 1'b0;
    while (cfg_pending) @(negedge clk);
  endtask

  task automatic wait_strobes(int n);
    int t;
    t = strobes + n;
    while (strobes < t) @(negedge clk);
  endtask

  // A cable stage: low-pass section with DC gain g.
  function automatic bq_coef_t cable(real g, real p);
    // H(z) = g (1 - p)^2 / 4 * (1 + z^-1)^2 / (1 - p z^-1)^2
    real k;
    k = g * (1.0 - p) * (1.0 - p) / 4.0;
    return '{b0: q16(k), b1: q16(2.0 * k), b2: q16(k), a1: q16(-2.0 * p), a2: q16(p * p)};
  endfunction

  function automatic bq_coef_t gain(real g, real d = 0.0);
    return '{b0: q16(g), b1: q16(d), b2: '0, a1: '0, a2: '0};
  endfunction

  // Three-port junction of equal lines: reflection -1/3, transmission 2/3,
  // with a little frequency dependence on the transmissions.
  task automatic junction(int b, real gr, real gt);
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < 3; i++)
        set_node(b, j, i, (i == j) ? gain(gr, 0.02) : gain(gt, -0.03));
  endtask

  // ---------------------------------------------------------------- scenarios
  initial begin
    int first_co, first_cpe;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // 1. Reset state: transparent core, latency 1 + N * (S + 0 + 1) samples.
    wait_strobes(30);
    first_co = -1; first_cpe = -1;
    begin
      int t0;
      stim = STIM_IMP_CPE; amp = 1234;
      wait_strobes(1);
      t0 = strobes;
      for (int i = 0; i < 20; i++) begin
        wait_strobes(1);
        if ($signed(dac_co) == 1234 && first_co < 0) first_co = strobes - t0;
      end
      stim = STIM_IMP_CO; amp = -777;
      wait_strobes(1);
      t0 = strobes;
      for (int i = 0; i < 20; i++) begin
        wait_strobes(1);
        if ($signed(dac_cpe) == -777 && first_cpe < 0) first_cpe = strobes - t0;
      end
    end
    check("CPE->CO latency of the transparent core", first_co, 1 + N * (S + 1));
    check("CO->CPE latency of the transparent core", first_cpe, 1 + N * (S + 1));

    // 2. Test case A: 250 ft flat pair, node, 3000 ft TP2. At 1.52 ns/ft and
    //    31.25 ns per sample: 12 and 146 samples of line delay.
    set_line(0, 0, cable(0.95, 0.30)); set_line(0, 1, cable(0.98, 0.10));
    set_misc(0, 12 - (S + 1), 0, 0, 0, 0);
    for (int j = 0; j < 3; j++) for (int i = 0; i < 3; i++) set_node(0, j, i, '0);
    set_node(0, 0, 0, gain(-0.15, 0.03)); set_node(0, 1, 1, gain(0.15, -0.03));
    set_node(0, 1, 0, gain(0.85, 0.02));  set_node(0, 0, 1, gain(1.15, -0.02));
    set_line(1, 0, cable(0.60, 0.55)); set_line(1, 1, cable(0.70, 0.40));
    set_misc(1, 146 - (S + 1), 0, 0, 1, 0);
    set_misc(2, 0, 0, 1, 1, 0);
    commit_cfg();
    stim = STIM_RANDOM; amp = 6000;
    wait_strobes(400);
    stim = STIM_ZERO;
    wait_strobes(200);

    // 3. VDSL 4, 4.5 kft: 150 ft TP2, node + 150 ft tap, 150 ft TP2,
    //    node + 300 ft tap, 4500 ft TP1 (7, 7, 7, 15 and 219 samples). The
    //    first section gets no delay-line delay: the converters and analog
    //    filters take up about 200 ns of its 457 ns round trip, and the digital
    //    round trip through two stages and the node reflection is 8 samples.
    stim = STIM_ZERO;
    wait_strobes(300);
    set_line(0, 0, cable(0.98, 0.15)); set_line(0, 1, cable(0.99, 0.05));
    set_tap(0, 0, cable(0.98, 0.15));  set_tap(0, 1, cable(0.99, 0.05));
    set_misc(0, 0, 7 - (S + 1), 0, 0, 1);
    junction(0, -0.333, 0.667);
    set_line(1, 0, cable(0.98, 0.15)); set_line(1, 1, cable(0.99, 0.05));
    set_tap(1, 0, cable(0.95, 0.25));  set_tap(1, 1, cable(0.97, 0.10));
    set_misc(1, 7 - (S + 1), 15 - (S + 1), 0, 0, 1);
    junction(1, -0.333, 0.667);
    set_line(2, 0, cable(0.30, 0.80)); set_line(2, 1, cable(0.50, 0.60));
    set_misc(2, 219 - (S + 1), 0, 0, 1, 0);
    commit_cfg();
    begin
      int t0, first_echo;
      first_echo = -1;
      check("CPE side silent before the impulse", $signed(dac_cpe), 0);
      stim = STIM_IMP_CPE; amp = 8000;
      wait_strobes(1);
      t0 = strobes;
      for (int i = 0; i < 20; i++) begin
        wait_strobes(1);
        if ($signed(dac_cpe) != 0 && first_echo < 0) first_echo = strobes - t0;
      end
      $display("first-node echo after %0d samples (%0d ns of digital round trip)",
               first_echo, first_echo * 3125 / 100);
      check("first-node echo latency, samples", first_echo, 1 + (S + 1) + 1 + (S + 1));
      check("first-node echo within the 257 ns digital window", first_echo * 3125 <= 25700, 1);
    end
    wait_strobes(280);
    stim = STIM_RANDOM; amp = 5000;
    wait_strobes(600);

    // 4. Time-varying line: new gains on the running loop.
    set_line(1, 0, cable(0.90, 0.20));
    set_node(1, 1, 0, gain(0.60, 0.01));
    commit_cfg();
    wait_strobes(300);
    stim = STIM_ZERO;
    wait_strobes(300);

    // 5. High gain at full scale: the CO-side DAC must clip.
    for (int b = 0; b < N; b++) begin
      set_line(b, 0, gain(1.9)); set_line(b, 1, gain(1.0));
      set_misc(b, 1, 0, 0, 1, 0);
    end
    commit_cfg();
    stim = STIM_FULL;
    wait_strobes(200);
    stim = STIM_ZERO;
    wait_strobes(50);

    $display("mechanisms: reflection=%0d tap_echo=%0d line_bypass=%0d node_bypass=%0d long_delay=%0d commit=%0d clip=%0d",
             n_reflect, n_tap, n_lbyp, n_nbyp, n_long, n_commit, n_clip);
    check("node reflection occurred", n_reflect > 0, 1);
    check("tap echo occurred", n_tap > 0, 1);
    check("line bypass carried signal", n_lbyp > 0, 1);
    check("node bypass carried signal", n_nbyp > 0, 1);
    check("long delay line carried signal", n_long > 0, 1);
    check("configuration commits", n_commit, 4);
    check("DAC clipping occurred", n_clip > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
