// line_section: bidirectional emulation of one twisted-pair cable section.
//
// Each direction is a cascade of STAGES second-order sections followed by a
// delay line: the filters shape the frequency-dependent attenuation and the
// variable part of the phase, the delay line carries the constant part of the
// section's group delay. The STAGES sections are bidirectional, so stage k
// filters the forward wave and the backward wave of the same section in one
// sample period; the forward wave runs through stages 0..STAGES-1 and then its
// delay line, the backward wave through its own delay line and then stages
// STAGES-1..0, mirroring the cable. A cable is reciprocal, so both directions
// of a stage use the same coefficient set.
//
// Ports: a_in/a_out carry the forward wave (from the CPE side towards the CO
// side), b_in/b_out the backward wave. All outputs are registers updated once
// per sample strobe; a sample read on strobe n appears at the far side for the
// next stage to read on strobe n + STAGES + delay + 1.
//
// The filter-plus-delay-line structure and the bidirectional sections follow
// the document. The number of stages per section is not given there; the
// default of 2 is this design's choice, made so that the round trip over a
// 150 ft section and a node (2 x 3 + 1 = 7 samples, 219 ns) fits the 257 ns
// processing window the document quotes for that section.
module line_section
  import emu_pkg::*;
#(
  parameter int STAGES = 2,
  parameter int DEPTH  = 256,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  stb,
  input  bq_coef_t [STAGES-1:0] coef,
  input  logic [AW-1:0]         delay,
  input  sample_t               a_in,
  output sample_t               a_out,
  input  sample_t               b_in,
  output sample_t               b_out
);

  sample_t fwd [STAGES];  // forward output of each stage
  sample_t bwd [STAGES];  // backward output of each stage
  sample_t b_delayed;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    bq_coef_t cset [2];
    sample_t  xin  [2];
    sample_t  yout [2];

    assign cset[0] = coef[k];
    assign cset[1] = coef[k];
    assign xin[0]  = (k == 0) ? a_in : fwd[(k == 0) ? 0 : k-1];
    assign xin[1]  = (k == STAGES-1) ? b_delayed : bwd[(k == STAGES-1) ? k : k+1];
    assign fwd[k]  = yout[0];
    assign bwd[k]  = yout[1];

    biquad #(.NCH(2)) u_bq (
      .clk, .rst_n, .stb,
      .coef (cset),
      .x    (xin),
      .y    (yout)
    );
  end

  delay_line #(.DEPTH(DEPTH)) u_dly_fwd (
    .clk, .rst_n, .stb, .delay,
    .din  (fwd[STAGES-1]),
    .dout (a_out)
  );

  delay_line #(.DEPTH(DEPTH)) u_dly_bwd (
    .clk, .rst_n, .stb, .delay,
    .din  (b_in),
    .dout (b_delayed)
  );

  assign b_out = bwd[0];

endmodule
