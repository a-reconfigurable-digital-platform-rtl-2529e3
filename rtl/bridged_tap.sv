// bridged_tap: emulation of an open-ended unused pair hanging off a node.
//
// A bridged tap is a cable section whose far end is left open. It is built as
// a line_section whose forward output is fed straight back into its backward
// input: an open end reflects the incident voltage wave completely and
// without sign change (reflection coefficient +1). The wave sent into the tap
// by the node therefore returns, filtered twice by the section's stages and
// delayed twice by its delay line, after 2 * (STAGES + delay + 1) samples.
//
// Ports: tap_in is the wave leaving the node into the tap, tap_out the wave
// coming back to the node; both are sample-strobe registers like every other
// stage of the chain.
//
// The tap as a line section with its own delay line follows the document's
// building-block drawing; the ideal open-end reflection is this design's
// reading of "open end" and can be refined through the node's tap-port
// coefficients.
module bridged_tap
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
  input  sample_t               tap_in,
  output sample_t               tap_out
);

  sample_t far_end;  // wave arriving at the open end, reflected unchanged

  line_section #(.STAGES(STAGES), .DEPTH(DEPTH)) u_line (
    .clk, .rst_n, .stb, .coef, .delay,
    .a_in  (tap_in),
    .a_out (far_end),
    .b_in  (far_end),
    .b_out (tap_out)
  );

endmodule
