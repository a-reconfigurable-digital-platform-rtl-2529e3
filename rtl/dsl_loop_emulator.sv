// dsl_loop_emulator: real-time digital propagation core of a copper access
// loop emulator.
//
// The core sits between two converter pairs: the CPE side (towards the
// subscriber modem) and the CO side (towards the exchange equipment). Each
// ADC sample enters a chain of N_BBB basic building blocks; the forward wave
// travels CPE -> CO, the backward wave CO -> CPE, and nodes inside the chain
// couple the two directions through their reflections, so each DAC output
// carries both the far end's signal, attenuated and delayed by the emulated
// loop, and the echoes of its own side's signal. Every block is set up at
// run time through the configuration port (see cfg_regs for the map), which
// lets one bitstream emulate different loop topologies and, by reloading
// coefficients between samples, time-varying lines.
//
//   adc_cpe -> sample_io -> bbb[0] -> bbb[1] -> ... -> bbb[N-1] -> sample_io -> dac_co
//   dac_cpe <- sample_io <- bbb[0] <- bbb[1] <- ... <- bbb[N-1] <- sample_io <- adc_co
//
// Timing: clk is the 160 MHz core clock. sample_timer divides it by
// SAMPLE_CYCLES into the 32 MSPS sample strobe conv_stb, on which the
// converters are sampled and every filter section starts its five-cycle
// schedule. Every building part is one lock-step register stage per sample
// (a line section STAGES + delay + 1 samples, a node 1, the converter
// registers 1 each), so the end-to-end delay is an exact number of samples.
//
// The reflection modules at the loop ends (the impedance mismatch towards the
// modems), the converters, the hybrids, the USB transceiver and the link
// between the two boards of the instrument are outside this core: the
// converter codes and a host write port are its ports. The whole chain is one
// core here; the document spreads it over two FPGAs, one per side.
//
// Defaults: N_BBB = 3 building blocks (enough for the most complex loop the
// document evaluates, ANSI VDSL 4 with two bridged taps), STAGES = 2 filter
// sections per cable section and DEPTH = 256 samples of delay per line, all
// this design's choices; the 32-bit word, 14-bit converters and 5 clocks per
// sample follow the document.
module dsl_loop_emulator
  import emu_pkg::*;
#(
  parameter int N_BBB  = 3,
  parameter int STAGES = 2,
  parameter int DEPTH  = 256,
  localparam int BW    = (N_BBB > 1) ? $clog2(N_BBB) : 1,
  localparam int CAW   = BW + 7
) (
  input  logic              clk,
  input  logic              rst_n,
  // converters
  output logic              conv_stb,   // sample clock enable, 1 of 5 cycles
  input  logic [CONV_W-1:0] adc_cpe,
  input  logic [CONV_W-1:0] adc_co,
  output logic [CONV_W-1:0] dac_cpe,
  output logic [CONV_W-1:0] dac_co,
  output logic              clip_cpe,
  output logic              clip_co,
  // host configuration port
  input  logic              cfg_we,
  input  logic [CAW-1:0]    cfg_addr,
  input  logic [31:0]       cfg_wdata,
  input  logic              cfg_commit,
  output logic              cfg_pending
);

  localparam int AW = $clog2(DEPTH);

  logic stb;

  bq_coef_t [STAGES-1:0] line_coef  [N_BBB];
  bq_coef_t [STAGES-1:0] tap_coef   [N_BBB];
  bq_coef_t [2:0][2:0]   node_coef  [N_BBB];
  logic [AW-1:0]         line_delay [N_BBB];
  logic [AW-1:0]         tap_delay  [N_BBB];
  bbb_ctrl_t             ctrl       [N_BBB];

  sample_t f [N_BBB+1];  // forward wave between blocks, f[0] from the CPE side
  sample_t b [N_BBB+1];  // backward wave between blocks, b[N_BBB] from the CO side

  sample_timer #(.DIV(SAMPLE_CYCLES)) u_timer (.clk, .rst_n, .stb);

  assign conv_stb = stb;

  cfg_regs #(.N_BBB(N_BBB), .STAGES(STAGES), .DEPTH(DEPTH)) u_cfg (
    .clk, .rst_n, .stb,
    .we      (cfg_we),
    .addr    (cfg_addr),
    .wdata   (cfg_wdata),
    .commit  (cfg_commit),
    .pending (cfg_pending),
    .line_coef, .tap_coef, .node_coef, .line_delay, .tap_delay, .ctrl
  );

  sample_io u_io_cpe (
    .clk, .rst_n, .stb,
    .adc_code (adc_cpe),
    .rx       (f[0]),
    .tx       (b[0]),
    .dac_code (dac_cpe),
    .dac_clip (clip_cpe)
  );

  sample_io u_io_co (
    .clk, .rst_n, .stb,
    .adc_code (adc_co),
    .rx       (b[N_BBB]),
    .tx       (f[N_BBB]),
    .dac_code (dac_co),
    .dac_clip (clip_co)
  );

  for (genvar n = 0; n < N_BBB; n++) begin : g_bbb
    bbb #(.STAGES(STAGES), .DEPTH(DEPTH)) u_bbb (
      .clk, .rst_n, .stb,
      .line_coef  (line_coef[n]),
      .tap_coef   (tap_coef[n]),
      .node_coef  (node_coef[n]),
      .line_delay (line_delay[n]),
      .tap_delay  (tap_delay[n]),
      .ctrl       (ctrl[n]),
      .in_f       (f[n]),
      .out_f      (f[n+1]),
      .in_b       (b[n+1]),
      .out_b      (b[n])
    );
  end

  // The sample strobe must come exactly once every SAMPLE_CYCLES clocks:
  // the filter schedules fill the whole period.
  assert property (@(posedge clk) disable iff (!rst_n) stb |=> !stb [* (SAMPLE_CYCLES - 1)] ##1 stb)
    else $error("dsl_loop_emulator: sample strobe period is not %0d cycles", SAMPLE_CYCLES);

endmodule
