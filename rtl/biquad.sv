// biquad: configurable bidirectional second-order IIR section.
//
// One instance filters one sample of each of its NCH channels (two for a
// bidirectional section: the forward and the backward wave) in every sample
// period of SAMPLE_CYCLES = 5 core clocks. Each channel runs the transposed
// direct form II recursion
//     y  = b0*x + s1
//     s1 = b1*x - a1*y + s2
//     s2 = b2*x - a2*y
// with its own coefficient set. The channels share one datapath of three
// 32x18 multipliers and four adders, scheduled as follows:
//   cycle 0 (stb high)  capture the channel inputs
//   cycle 1             channel 0 step A: b0*x, b1*x, b2*x (3 multipliers)
//                       y = b0*x + s1, u1 = b1*x + s2 (adders 1, 2), u2 = b2*x
//   cycle 2             channel 0 step B: a1*y, a2*y (2 multipliers)
//                       s1 = u1 - a1*y, s2 = u2 - a2*y (adders 3, 4)
//   cycles 3, 4         the same two steps for channel 1 (if NCH = 2)
// y is cut back to 32 bits by an arithmetic shift (truncation) and saturated
// before it is fed back, so the feedback uses exactly the value that leaves
// the section; the states keep full product precision.
//
// Interface: stb is the one-cycle sample strobe; x is sampled on the clock
// edge that sees it. y[ch] is a register that takes the new output one edge
// (channel 0) or three edges (channel 1) later and holds it for the rest of
// the period, so the next stage of the
// lock-step chain reads it on the following stb: one sample of latency per
// section. Coefficients must be stable between two strobes.
//
// The document gives the section's order, its bidirectional use, the 32-bit
// word, the five-cycle budget and the count of three 32x18 multipliers and
// four adders. The filter form, the schedule that matches that count and the
// truncation are this design's own.
module biquad
  import emu_pkg::*;
#(
  parameter int NCH = 2  // channels per section: 2 = bidirectional, 1 = single
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     stb,
  input  bq_coef_t coef [NCH],
  input  sample_t  x    [NCH],
  output sample_t  y    [NCH]
);

  initial assert (NCH == 1 || NCH == 2)
    else $error("biquad: NCH must be 1 or 2");

  localparam int LAST_STEP = 2 * NCH;

  logic [2:0] step;          // 0 = idle, 1..2*NCH = compute steps
  sample_t    xr [NCH];      // captured inputs
  acc_t       s1 [NCH];
  acc_t       s2 [NCH];
  acc_t       u1, u2;        // step A partial sums, consumed by step B

  logic       ch;            // channel served in this step
  logic       step_a;        // 1 = step A, 0 = step B
  coef_t      m0_c, m1_c, m2_c;
  sample_t    m0_d, m1_d, m2_d;
  acc_t       p0, p1, p2;    // multiplier outputs
  acc_t       add_y, add_u1; // step A adders
  acc_t       add_s1, add_s2;// step B adders
  sample_t    y_new;

  assign ch     = (NCH == 2) ? (step > 3'd2) : 1'b0;
  assign step_a = step[0];

  // Operand selection for the three shared multipliers.
  always_comb begin
    if (step_a) begin
      m0_c = coef[ch].b0;  m0_d = xr[ch];
      m1_c = coef[ch].b1;  m1_d = xr[ch];
      m2_c = coef[ch].b2;  m2_d = xr[ch];
    end else begin
      m0_c = coef[ch].a1;  m0_d = y[ch];
      m1_c = coef[ch].a2;  m1_d = y[ch];
      m2_c = '0;           m2_d = '0;
    end
  end

  assign p0 = acc_t'(m0_d) * acc_t'(m0_c);
  assign p1 = acc_t'(m1_d) * acc_t'(m1_c);
  assign p2 = acc_t'(m2_d) * acc_t'(m2_c);

  // The four adders: step A adds the states to the feed-forward products,
  // step B subtracts the feedback products from the partial sums.
  assign add_y  = p0 + s1[ch];
  assign add_u1 = p1 + s2[ch];
  assign add_s1 = u1 - p0;
  assign add_s2 = u2 - p1;
  assign y_new  = scale_sat(add_y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0;
      u1   <= '0;
      u2   <= '0;
      for (int c = 0; c < NCH; c++) begin
        xr[c] <= '0;
        s1[c] <= '0;
        s2[c] <= '0;
        y[c]  <= '0;
      end
    end else begin
      if (stb) begin
        step <= 3'd1;
        for (int c = 0; c < NCH; c++) xr[c] <= x[c];
      end else if (step != 3'd0) begin
        step <= (step == 3'(LAST_STEP)) ? 3'd0 : step + 3'd1;
        if (step_a) begin
          y[ch] <= y_new;
          u1    <= add_u1;
          u2    <= p2;
        end else begin
          s1[ch] <= add_s1;
          s2[ch] <= add_s2;
        end
      end
    end
  end

  // A new sample must not arrive before the previous one is finished.
  assert property (@(posedge clk) disable iff (!rst_n) stb |-> (step == 3'd0))
    else $error("biquad: sample strobe while the schedule is still running");

endmodule
