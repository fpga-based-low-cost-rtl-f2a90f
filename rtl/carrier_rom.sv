// carrier_rom: one carrier-sample ROM (ROM1/ROM2 of the block diagram,
// `frequency_1` / `frequency_0` of the schematic).
//
// DEPTH (40) words of WIDTH (32) bits, each an IEEE-754 single-precision sample
// of sin(2*pi*(CYCLES*k/DEPTH + PHASE_DEG/360)), k = address. CYCLES is the
// number of carrier periods in one bit and PHASE_DEG the start phase, so the
// same ROM serves as a 0 or 180 degree BPSK carrier or as either BFSK tone.
// The contents are computed at elaboration by mod_pkg::carrier_sample().
// The read is synchronous: q shows the word at the address of the previous
// clock edge (one clock of latency), as the clocked ROM of the original.
// An address of DEPTH or above reads 0. DEPTH must not exceed 2**AW.
module carrier_rom
  import mod_pkg::SAMPLES_PER_BIT, mod_pkg::ADDR_W, mod_pkg::SAMPLE_W, mod_pkg::carrier_sample;
#(
  parameter int unsigned CYCLES    = 1,
  parameter int unsigned PHASE_DEG = 0,
  parameter int unsigned DEPTH     = SAMPLES_PER_BIT,
  parameter int unsigned AW        = ADDR_W,
  parameter int unsigned WIDTH     = SAMPLE_W
) (
  input  logic             clock,
  input  logic [AW-1:0]    address,
  output logic [WIDTH-1:0] q
);

  // The table spans the whole address range; words DEPTH and above are 0.
  localparam int unsigned SPAN = 2 ** AW;

  typedef logic [WIDTH-1:0] table_t [SPAN];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned k = 0; k < SPAN; k++)
      t[k] = (k < DEPTH) ? WIDTH'(carrier_sample(CYCLES, PHASE_DEG, k, DEPTH)) : '0;
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clock) q <= TABLE[address];

endmodule
