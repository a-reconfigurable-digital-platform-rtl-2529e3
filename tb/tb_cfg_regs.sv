// tb_cfg_regs: self-checking test of the parameter store.
//
// Checks the reset configuration (unity line stages, nodes bypassed), then
// writes a distinct value into every coefficient, delay and switch register
// of every block through the address map and checks that
//   - nothing reaches the active outputs before a commit,
//   - after a commit the copy happens on the next strobe, not earlier,
//     and pending is high exactly until then,
//   - every output field holds the value written to its address,
//   - writes to unused offsets and to absent blocks change nothing.
module tb_cfg_regs;
  import emu_pkg::*;

  localparam int N_BBB  = 3;
  localparam int STAGES = 2;
  localparam int DEPTH  = 256;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  stb = 1'b0;
  logic                  we = 1'b0;
  logic [8:0]            addr;
  logic [31:0]           wdata;
  logic                  commit = 1'b0;
  logic                  pending;
  bq_coef_t [STAGES-1:0] line_coef  [N_BBB];
  bq_coef_t [STAGES-1:0] tap_coef   [N_BBB];
  bq_coef_t [2:0][2:0]   node_coef  [N_BBB];
  logic [7:0]            line_delay [N_BBB];
  logic [7:0]            tap_delay  [N_BBB];
  bbb_ctrl_t             ctrl       [N_BBB];

  int checks = 0, failures = 0;

  cfg_regs #(.N_BBB(N_BBB), .STAGES(STAGES), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .stb, .we, .addr, .wdata, .commit, .pending,
    .line_coef, .tap_coef, .node_coef, .line_delay, .tap_delay, .ctrl);

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

  task automatic write(int b, int off, logic [31:0] v);
    addr = 9'(b * 128 + off);
    wdata = v;
    we = 1'b1;
    @(posedge clk); #1;
    we = 1'b0;
  endtask

  // Value written to coefficient c of section `sec` of region r in block b.
  function automatic coef_t val(int b, int r, int sec, int c);
    return coef_t'(b * 20000 + r * 5000 + sec * 100 + c * 7 - 30000);
  endfunction

  function automatic coef_t field(bq_coef_t q, int c);
    case (c)
      0: return q.b0;
      1: return q.b1;
      2: return q.b2;
      3: return q.a1;
      default: return q.a2;
    endcase
  endfunction

  task automatic check_active(bit written);
    for (int b = 0; b < N_BBB; b++) begin
      for (int k = 0; k < STAGES; k++)
        for (int c = 0; c < 5; c++) begin
          check($sformatf("line b%0d k%0d c%0d", b, k, c), field(line_coef[b][k], c),
                written ? val(b, 0, k, c) : ((c == 0) ? 65536 : 0));
          check($sformatf("tap b%0d k%0d c%0d", b, k, c), field(tap_coef[b][k], c),
                written ? val(b, 1, k, c) : 0);
        end
      for (int j = 0; j < 3; j++)
        for (int i = 0; i < 3; i++)
          for (int c = 0; c < 5; c++)
            check($sformatf("node b%0d %0d<-%0d c%0d", b, j, i, c), field(node_coef[b][j][i], c),
                  written ? val(b, 2, 3 * j + i, c) : 0);
      check("line delay", line_delay[b], written ? 10 + 40 * b : 0);
      check("tap delay", tap_delay[b], written ? 200 + b : 0);
      check("ctrl", ctrl[b], written ? 3'(b + 4) : 3'b010);
    end
  endtask

  initial begin
    addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check_active(0);
    for (int b = 0; b < N_BBB; b++) begin
      for (int k = 0; k < STAGES; k++)
        for (int c = 0; c < 5; c++) begin
          write(b, 5 * k + c, 32'(val(b, 0, k, c)));
          write(b, 32 + 5 * k + c, 32'(val(b, 1, k, c)));
        end
      for (int e = 0; e < 9; e++)
        for (int c = 0; c < 5; c++) write(b, 64 + 5 * e + c, 32'(val(b, 2, e, c)));
      write(b, 'h70, 10 + 40 * b);
      write(b, 'h71, 200 + b);
      write(b, 'h72, 32'(b + 4));
      // Unused offsets and stages beyond STAGES: must be ignored.
      write(b, 5 * STAGES, 32'h1ffff);
      write(b, 'h6d, 32'h1ffff);
      write(b, 'h7f, 32'h1ffff);
    end
    write(3, 0, 32'h1ffff);  // block 3 does not exist
    stb = 1'b1; @(posedge clk); #1; stb = 1'b0;
    check("pending before commit", pending, 0);
    check_active(0);
    commit = 1'b1; @(posedge clk); #1; commit = 1'b0;
    check("pending after commit", pending, 1);
    repeat (3) @(posedge clk);
    #1;
    check_active(0);
    stb = 1'b1; @(posedge clk); #1; stb = 1'b0;
    check("pending cleared on strobe", pending, 0);
    check_active(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
