// delay_line: run-time configurable delay of a sample stream.
//
// Emulates the constant part of a cable section's group delay with a circular
// buffer of DEPTH samples. On every sample strobe the input is written at the
// write pointer and the output register is loaded with the sample written
// `delay` strobes earlier (delay = 0 loads the current input), so a sample
// taken on strobe n is presented after strobe n + delay and read by the next
// stage on strobe n + delay + 1. Until `delay` samples have been written after
// reset the output is zero rather than stale memory contents. The delay may
// be changed at any time; it takes effect on the next strobe.
//
// The document calls for a configurable delay line per cable section; the
// buffer organisation, the whole-sample step and the zero fill after reset are
// this design's own choices. DEPTH = 256 covers the longest section the
// document evaluates (4500 ft, about 219 samples at 32 MSPS and 1.52 ns/ft).
module delay_line
  import emu_pkg::*;
#(
  parameter int DEPTH = 256,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stb,
  input  logic [AW-1:0] delay,  // delay in samples, 0 .. DEPTH-1
  input  sample_t       din,
  output sample_t       dout
);

  sample_t       mem [DEPTH];
  logic [AW-1:0] wp;
  logic [AW-1:0] fill;   // samples written since reset, saturating at DEPTH-1
  logic [AW-1:0] rp;

  assign rp = wp - delay;

  always_ff @(posedge clk) begin
    if (stb) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      fill <= '0;
      dout <= '0;
    end else if (stb) begin
      wp <= wp + 1'b1;
      if (fill != AW'(DEPTH - 1)) fill <= fill + 1'b1;
      if (delay == '0)        dout <= din;
      else if (fill >= delay) dout <= mem[rp];
      else                    dout <= '0;
    end
  end

endmodule
