// control_block: timing generator of the modulator.
//
// A free-running phase counter runs from 0 to CLKS_PER_SAMPLE*SAMPLES_PER_BIT-1
// (0..79 by default) and produces two one-clock strobes:
//   rom           - high in the last clock of every sample period (every 2nd
//                   clock); it advances the ROM address counter.
//   bit_separator - high in phase 0 of every bit period (every 80th clock);
//                   it makes the bit separator present the next data bit.
// The strobe phases are chosen so that the registered ROM output moves to
// sample 0 on the same clock edge on which the bit separator moves to the next
// bit: the 40th `rom` strobe of a bit (phase 79) wraps the address to 0, the
// ROM registers sample 0 at the end of phase 0, and the `bit_separator` strobe
// of phase 0 loads the new bit at that same edge.
// The port names follow the original block symbol; the clock-only interface
// is the original's, while the synchronous reset `rst` (active high) and the
// exact strobe phases are choices of this design. The first bit strobe comes in
// the first clock after reset.
module control_block
  import mod_pkg::CLKS_PER_SAMPLE, mod_pkg::SAMPLES_PER_BIT;
#(
  parameter int unsigned CLKS_PER_SAMPLE_P = CLKS_PER_SAMPLE,
  parameter int unsigned SAMPLES_PER_BIT_P = SAMPLES_PER_BIT
) (
  input  logic clk,
  input  logic rst,
  output logic rom,
  output logic bit_separator
);

  localparam int unsigned CLKS_PER_BIT = CLKS_PER_SAMPLE_P * SAMPLES_PER_BIT_P;
  localparam int unsigned PH_W = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic [PH_W-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst)                                 phase <= '0;
    else if (phase == PH_W'(CLKS_PER_BIT-1)) phase <= '0;
    else                                     phase <= phase + 1'b1;
  end

  always_comb begin
    rom           = ((phase % PH_W'(CLKS_PER_SAMPLE_P)) == PH_W'(CLKS_PER_SAMPLE_P-1));
    bit_separator = (phase == '0);
  end

endmodule
