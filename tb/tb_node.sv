// tb_node: self-checking test of the three-port node.
//
// Each of the nine scattering entries gets its own second-order section and
// all three ports get random input; every output is checked, strobe by
// strobe, against the saturated sum of three reference filters. A first
// phase with pure gains (reflection 0.25 / transmission 1.25 style values)
// checks the one-sample latency and the routing of every entry by hand, and
// a last phase checks that the output sum saturates.
module tb_node;
  import emu_pkg::*;
  import tb_ref_pkg::*;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                stb = 1'b0;
  bq_coef_t [2:0][2:0] coef;
  sample_t             in  [3];
  sample_t             out [3];

  int checks = 0, failures = 0;

  node dut (.clk, .rst_n, .stb, .coef, .in, .out);

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
    bq_ref m [3][3];
    foreach (m[j, i]) m[j][i] = new();
    for (int i = 0; i < 3; i++) in[i] = '0;
    // Distinct gain per entry: port i -> port j gains (j*3 + i + 1) / 16.
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < 3; i++)
        coef[j][i] = '{b0: coef_t'((j * 3 + i + 1) <<< 12), default: '0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;

    // Routing: drive one port at a time with 16000 and read all three outputs.
    for (int i = 0; i < 3; i++) begin
      for (int k = 0; k < 3; k++) in[k] = '0;
      in[i] = 16000;
      strobe();
      for (int j = 0; j < 3; j++)
        check($sformatf("gain from port %0d to port %0d", i, j), out[j], (j * 3 + i + 1) * 1000);
      for (int k = 0; k < 3; k++) in[k] = '0;
      strobe();
      for (int j = 0; j < 3; j++)
        check("impulse gone after one sample", out[j], 0);
    end

    // Random filters on every entry, random inputs on every port.
    coef[0][0] = '{b0: q16(-0.30), b1: q16(0.10), b2: q16(0.02), a1: q16(-0.5), a2: q16(0.1)};
    coef[1][1] = '{b0: q16(0.25), b1: q16(-0.05), b2: q16(0.0), a1: q16(-0.2), a2: q16(0.05)};
    coef[2][2] = '{b0: q16(0.15), b1: q16(0.05), b2: q16(0.01), a1: q16(0.3), a2: q16(0.02)};
    coef[1][0] = '{b0: q16(0.70), b1: q16(0.20), b2: q16(-0.1), a1: q16(-0.8), a2: q16(0.2)};
    coef[0][1] = '{b0: q16(0.75), b1: q16(0.10), b2: q16(-0.05), a1: q16(-0.7), a2: q16(0.15)};
    coef[2][0] = '{b0: q16(0.40), b1: q16(0.00), b2: q16(0.1), a1: q16(-0.6), a2: q16(0.3)};
    coef[0][2] = '{b0: q16(0.45), b1: q16(-0.1), b2: q16(0.0), a1: q16(-0.4), a2: q16(0.1)};
    coef[2][1] = '{b0: q16(0.35), b1: q16(0.15), b2: q16(0.05), a1: q16(-1.1), a2: q16(0.4)};
    coef[1][2] = '{b0: q16(0.50), b1: q16(0.05), b2: q16(0.05), a1: q16(-0.3), a2: q16(0.2)};
    foreach (m[j, i]) m[j][i] = new();
    for (int n = 0; n < 200; n++) begin
      longint v [3];
      longint h [3][3];
      for (int i = 0; i < 3; i++) begin
        v[i] = longint'($urandom_range(0, 1 << 29)) - (1 << 28);
        in[i] = sample_t'(v[i]);
      end
      strobe();
      for (int j = 0; j < 3; j++)
        for (int i = 0; i < 3; i++) h[j][i] = m[j][i].step(coef[j][i], v[i]);
      for (int j = 0; j < 3; j++)
        check($sformatf("port %0d output", j), out[j], sat32(h[j][0] + h[j][1] + h[j][2]));
    end

    // Saturation of the sum: unity gains everywhere, near full-scale inputs.
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < 3; i++) coef[j][i] = '{b0: COEF_ONE, default: '0};
    for (int i = 0; i < 3; i++) in[i] = 32'sd1500000000;
    repeat (4) strobe();
    check("sum saturates high", out[1], 64'sd2147483647);
    for (int i = 0; i < 3; i++) in[i] = -32'sd1500000000;
    repeat (4) strobe();
    check("sum saturates low", out[2], -64'sd2147483648);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
