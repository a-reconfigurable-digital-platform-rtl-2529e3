// sample_io: converter interface of one side of the emulator.
//
// Connects a CONV_W-bit ADC and a CONV_W-bit DAC to the 32-bit processing
// word. On every sample strobe the ADC code (two's complement) is registered
// and placed CONV_SHIFT bits up in the word, which leaves guard bits above the
// converter's full scale for the gain of filter sections. In the same strobe
// the core's outgoing sample is rounded to the converter LSB (halves up) and
// saturated to the DAC range; dac_clip pulses for one strobe period when a
// sample had to be clipped.
//
// The low CONV_SHIFT bits of rx are zero by construction.
//
// Timing: rx and dac_code are registers that change only on a strobe; one
// strobe of latency in each direction.
//
// The 14-bit converters and the 32-bit processing word follow the document;
// the code format, the placement of the converter bits and the clip flag are
// this design's own choices.
module sample_io
  import emu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stb,
  input  logic [CONV_W-1:0] adc_code,
  output sample_t           rx,
  input  sample_t           tx,
  output logic [CONV_W-1:0] dac_code,
  output logic              dac_clip
);

  localparam acc_t DAC_MAX = acc_t'(2**(CONV_W-1) - 1);
  localparam acc_t DAC_MIN = -acc_t'(2**(CONV_W-1));

  acc_t tx_round;

  assign tx_round = (acc_t'(tx) + acc_t'(1 <<< (CONV_SHIFT - 1))) >>> CONV_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx       <= '0;
      dac_code <= '0;
      dac_clip <= 1'b0;
    end else if (stb) begin
      rx <= sample_t'($signed(adc_code)) <<< CONV_SHIFT;
      if (tx_round > DAC_MAX) begin
        dac_code <= CONV_W'(DAC_MAX);
        dac_clip <= 1'b1;
      end else if (tx_round < DAC_MIN) begin
        dac_code <= CONV_W'(DAC_MIN);
        dac_clip <= 1'b1;
      end else begin
        dac_code <= CONV_W'(tx_round);
        dac_clip <= 1'b0;
      end
    end
  end

endmodule
