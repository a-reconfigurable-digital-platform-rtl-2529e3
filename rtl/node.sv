// node: frequency-dependent splice between cable sections.
//
// A node joins three ports: port 0 towards the CPE-side line section, port 1
// towards the CO-side neighbour and port 2 towards a bridged tap. It applies
// a 3x3 scattering matrix whose entries are filters: the diagonal entries are
// the reflections Gamma1..Gamma3 seen at each port, the off-diagonal entries
// the transmissions 1+Gamma from one port into another:
//     out[j] = sum over i of H[j][i](in[i])
// coef[j][i] holds the second-order section H[j][i] (from port i to port j).
// The nine filters are packed into bidirectional sections: one section per
// port pair (i -> j and j -> i) and one more for the reflections at ports 0
// and 1; the reflection at port 2 uses a single-channel section. Each output
// is the saturated sum of three filter outputs.
//
// Ports: in[i] is the wave arriving at port i, out[j] the wave leaving port j.
// Every filter output is a sample-strobe register, so a node adds one sample
// of latency.
//
// The matrix layout (reflections on the diagonal, 1+Gamma elsewhere) is the
// one the document draws for the node; one second-order section per entry and
// the packing into sections are this design's choices.
module node
  import emu_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       stb,
  input  bq_coef_t [2:0][2:0]        coef,   // coef[to][from]
  input  sample_t                    in  [3],
  output sample_t                    out [3]
);

  sample_t h [3][3];  // h[j][i]: filter output from port i to port j

  // Transmission pairs.
  for (genvar p = 0; p < 3; p++) begin : g_pair
    localparam int I = (p == 2) ? 1 : 0;
    localparam int J = (p == 0) ? 1 : 2;
    bq_coef_t cset [2];
    sample_t  xin  [2];
    sample_t  yout [2];
    assign cset[0] = coef[J][I];
    assign cset[1] = coef[I][J];
    assign xin[0]  = in[I];
    assign xin[1]  = in[J];
    assign h[J][I] = yout[0];
    assign h[I][J] = yout[1];
    biquad #(.NCH(2)) u_bq (.clk, .rst_n, .stb, .coef(cset), .x(xin), .y(yout));
  end

  // Reflections at ports 0 and 1.
  begin : g_refl01
    bq_coef_t cset [2];
    sample_t  xin  [2];
    sample_t  yout [2];
    assign cset[0] = coef[0][0];
    assign cset[1] = coef[1][1];
    assign xin[0]  = in[0];
    assign xin[1]  = in[1];
    assign h[0][0] = yout[0];
    assign h[1][1] = yout[1];
    biquad #(.NCH(2)) u_bq (.clk, .rst_n, .stb, .coef(cset), .x(xin), .y(yout));
  end

  // Reflection at port 2.
  begin : g_refl2
    bq_coef_t cset [1];
    sample_t  xin  [1];
    sample_t  yout [1];
    assign cset[0] = coef[2][2];
    assign xin[0]  = in[2];
    assign h[2][2] = yout[0];
    biquad #(.NCH(1)) u_bq (.clk, .rst_n, .stb, .coef(cset), .x(xin), .y(yout));
  end

  always_comb begin
    for (int j = 0; j < 3; j++)
      out[j] = sat_sum(acc_t'(h[j][0]) + acc_t'(h[j][1]) + acc_t'(h[j][2]));
  end

endmodule
