// bbb: basic building block of the loop emulator.
//
// A loop topology is cut into a cascade of these blocks. Each block holds a
// cable section (line_section), the node at its CO-side end and a bridged
// tap hanging off that node:
//
//   in_f  ->  line section  -> node port 0      node port 1 -> out_f
//   out_b <-  line section  <- node port 0      node port 1 <- in_b
//                                  node port 2 <-> bridged tap
//
// Three run-time switches (ctrl) let one block stand for any piece of a
// topology: line_bypass replaces the cable section by a wire, node_bypass
// replaces the node by a straight connection (no reflection, no tap) and
// tap_en connects the tap; with the tap disconnected the node's port 2 sees
// silence. Bypassed parts add no latency. All coefficients, delays and
// switches are expected to change only on a sample strobe (cfg_regs does
// that), so each sample period sees one consistent configuration.
//
// Ports: in_f/out_f carry the forward wave (CPE towards CO), in_b/out_b the
// backward wave. out_f and out_b are combinational only where a part is
// bypassed; otherwise they come straight from strobe registers.
//
// The block structure (line, node, tap) and the option to bypass parts follow
// the document; which parts can be bypassed, and the combinational bypass,
// are this design's choices.
module bbb
  import emu_pkg::*;
#(
  parameter int STAGES = 2,
  parameter int DEPTH  = 256,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  stb,
  input  bq_coef_t [STAGES-1:0] line_coef,
  input  bq_coef_t [STAGES-1:0] tap_coef,
  input  bq_coef_t [2:0][2:0]   node_coef,
  input  logic [AW-1:0]         line_delay,
  input  logic [AW-1:0]         tap_delay,
  input  bbb_ctrl_t             ctrl,
  input  sample_t               in_f,
  output sample_t               out_f,
  input  sample_t               in_b,
  output sample_t               out_b
);

  sample_t ls_a_out, ls_b_out;   // line section outputs
  sample_t line_f;               // forward wave arriving at the node
  sample_t to_line_b;            // backward wave leaving the node
  sample_t n_in  [3];
  sample_t n_out [3];
  sample_t tap_ret;

  line_section #(.STAGES(STAGES), .DEPTH(DEPTH)) u_line (
    .clk, .rst_n, .stb,
    .coef  (line_coef),
    .delay (line_delay),
    .a_in  (in_f),
    .a_out (ls_a_out),
    .b_in  (to_line_b),
    .b_out (ls_b_out)
  );

  assign line_f = ctrl.line_bypass ? in_f      : ls_a_out;
  assign out_b  = ctrl.line_bypass ? to_line_b : ls_b_out;

  assign n_in[0] = line_f;
  assign n_in[1] = in_b;
  assign n_in[2] = ctrl.tap_en ? tap_ret : '0;

  node u_node (
    .clk, .rst_n, .stb,
    .coef (node_coef),
    .in   (n_in),
    .out  (n_out)
  );

  bridged_tap #(.STAGES(STAGES), .DEPTH(DEPTH)) u_tap (
    .clk, .rst_n, .stb,
    .coef    (tap_coef),
    .delay   (tap_delay),
    .tap_in  (ctrl.tap_en ? n_out[2] : '0),
    .tap_out (tap_ret)
  );

  assign to_line_b = ctrl.node_bypass ? in_b   : n_out[0];
  assign out_f     = ctrl.node_bypass ? line_f : n_out[1];

endmodule
