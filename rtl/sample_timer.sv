// sample_timer: sample strobe of the processing core.
//
// The core runs at DIV times the converter sample rate (160 MHz against
// 32 MSPS, DIV = 5). This counter issues a one-cycle strobe every DIV core
// clocks; the strobe is the converter sample clock enable and starts the
// DIV-cycle schedule of every filter section. The strobe is high in the first
// cycle after reset and then every DIV cycles.
//
// Rates follow the document; the counter itself is this design's own.
module sample_timer #(
  parameter int DIV  = 5,
  localparam int PW  = (DIV > 1) ? $clog2(DIV) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          stb
);

  logic [PW-1:0] phase;  // position in the sample period, 0 on the strobe cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= (phase == PW'(DIV - 1)) ? '0 : phase + 1'b1;
  end

  assign stb = (phase == '0);

endmodule
