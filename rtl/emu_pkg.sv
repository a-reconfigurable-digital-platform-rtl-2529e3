// emu_pkg: types and constants shared by the copper-loop propagation core.
//
// Samples are 32-bit two's-complement words (the processing word width of the
// core). Filter coefficients are 18-bit two's complement with 16 fractional
// bits (Q2.16, range [-2, 2)), which matches the 32x18 multipliers of the
// filter sections. Products and filter states are carried at full product
// precision (ACC_W bits) and cut back to a 32-bit sample only where a sample
// leaves a filter (arithmetic shift, i.e. truncation towards minus infinity,
// then saturation). The core clock runs SAMPLE_CYCLES times faster than
// the sample rate (160 MHz against 32 MSPS). The 32-bit word, the 18-bit
// coefficient width and the 5-cycle sample period follow the document; the
// Q2.16 coefficient scaling, the accumulator width and the truncation rule
// are this design's own choices.
package emu_pkg;

  localparam int DATA_W        = 32;  // processing word width
  localparam int COEF_W        = 18;  // coefficient width (32x18 multipliers)
  localparam int COEF_FRAC     = 16;  // fractional bits of a coefficient
  localparam int ACC_W         = 56;  // width of products, sums and filter states
  localparam int SAMPLE_CYCLES = 5;   // core clocks per sample (160 MHz / 32 MSPS)
  localparam int CONV_W        = 14;  // ADC and DAC resolution
  localparam int CONV_SHIFT    = 16;  // position of the converter LSB in a sample

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Coefficients of one second-order section:
  //   H(z) = (b0 + b1 z^-1 + b2 z^-2) / (1 + a1 z^-1 + a2 z^-2)
  typedef struct packed {
    coef_t b0;
    coef_t b1;
    coef_t b2;
    coef_t a1;
    coef_t a2;
  } bq_coef_t;

  // Run-time switches of one basic building block.
  typedef struct packed {
    logic tap_en;       // bridged tap connected to the node
    logic node_bypass;  // node replaced by a straight connection
    logic line_bypass;  // line section replaced by a straight connection
  } bbb_ctrl_t;

  localparam coef_t COEF_ONE = coef_t'(1 <<< COEF_FRAC);

  localparam acc_t ACC_SMAX = (acc_t'(1) <<< (DATA_W-1)) - acc_t'(1);
  localparam acc_t ACC_SMIN = -(acc_t'(1) <<< (DATA_W-1));

  // Scale an accumulator (scaled by 2^COEF_FRAC) back to a sample by an
  // arithmetic shift (truncation towards minus infinity, no adder needed)
  // and saturate to the sample range.
  function automatic sample_t scale_sat(input acc_t acc);
    acc_t r;
    r = acc >>> COEF_FRAC;
    if (r > ACC_SMAX)      return sample_t'(ACC_SMAX);
    else if (r < ACC_SMIN) return sample_t'(ACC_SMIN);
    else                   return sample_t'(r);
  endfunction

  // Saturate a wider sum of samples back to the sample range.
  function automatic sample_t sat_sum(input acc_t s);
    if (s > ACC_SMAX)      return sample_t'(ACC_SMAX);
    else if (s < ACC_SMIN) return sample_t'(ACC_SMIN);
    else                   return sample_t'(s);
  endfunction

endpackage
