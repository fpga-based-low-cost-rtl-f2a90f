// bpsk_modulator: binary phase-shift keying modulator. The generic ROM
// modulator with frequency_1 = sin(2*pi*k/40) (0 degrees, sent for bit 1) and
// frequency_0 = sin(2*pi*k/40 + pi) (180 degrees, sent for bit 0): one carrier
// period per bit, so the carrier is 50 MHz / 80 = 625 kHz at a 50 MHz clock and
// the bit rate is 625 kbit/s. The ports follow the original block symbol
// (clk, d_in[13:0], result[31:0]) plus the d_out pin of its schematic and the
// synchronous reset `rst` added by this design. Timing as modulator_core.
module bpsk_modulator
  import mod_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [DATA_W-1:0]   d_in,
  output logic [SAMPLE_W-1:0] result,
  output logic                d_out
);

  modulator_core #(
    .F1_CYCLES(1), .F1_PHASE_DEG(0),
    .F0_CYCLES(1), .F0_PHASE_DEG(180)
  ) u_core (
    .clk   (clk),
    .rst   (rst),
    .d_in  (d_in),
    .result(result),
    .d_out (d_out)
  );

endmodule
