// bfsk_modulator: binary frequency-shift keying modulator. The generic ROM
// modulator with frequency_1 holding two carrier periods per bit (sent for
// bit 1) and frequency_0 one period per bit (bit 0), both starting at 0
// degrees, so the tones are 1.25 MHz and 625 kHz at a 50 MHz clock and the
// signal is phase-continuous at every bit boundary. The 2:1 tone ratio is read
// from the sample words of the original simulation trace; F1_CYCLES and
// F0_CYCLES may be changed (F1_CYCLES below 20 keeps the tone under the
// sampling Nyquist limit). The ports follow the original block symbol
// (clk, d_in[13:0], result[31:0]) plus the d_out pin of its schematic and the
// synchronous reset `rst` added by this design. Timing as modulator_core.
module bfsk_modulator
  import mod_pkg::*;
#(
  parameter int unsigned F1_CYCLES = 2,
  parameter int unsigned F0_CYCLES = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [DATA_W-1:0]   d_in,
  output logic [SAMPLE_W-1:0] result,
  output logic                d_out
);

  modulator_core #(
    .F1_CYCLES(F1_CYCLES), .F1_PHASE_DEG(0),
    .F0_CYCLES(F0_CYCLES), .F0_PHASE_DEG(0)
  ) u_core (
    .clk   (clk),
    .rst   (rst),
    .d_in  (d_in),
    .result(result),
    .d_out (d_out)
  );

endmodule
