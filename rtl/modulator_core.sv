// modulator_core: the ROM-based binary modulator of the block diagram and
// schematic. Which modulation it performs is set only by the ROM contents:
//   BPSK - both ROMs hold one carrier period per bit, 0 and 180 degrees apart;
//   BFSK - the ROMs hold two tones with different numbers of periods per bit.
//
// Structure (as in the original schematic):
//   control_block  -> `rom` strobe (every CLKS_PER_SAMPLE clocks) enables the
//                     modulus-40 address counter; `bit_separator` strobe (every
//                     80 clocks) enables the bit separator.
//   sample_counter -> 6-bit address, shared by both ROMs.
//   carrier_rom x2 -> frequency_1 (sent for bit 1) and frequency_0 (bit 0),
//                     synchronous read.
//   bit_separator  -> d_out, the current bit, selects the mux.
//   sample_mux     -> result, the 32-bit float sample of the modulated signal.
// Timing: after reset, bit 0 of d_in is on d_out and sample 0 of its carrier on
// result from the first clock edge on; each sample stays CLKS_PER_SAMPLE
// clocks, each bit SAMPLES_PER_BIT*CLKS_PER_SAMPLE clocks, and every bit
// begins with sample 0 of its carrier on the same edge as d_out changes.
// rst (synchronous, active high) is this design's addition.
module modulator_core
  import mod_pkg::*;
#(
  parameter int unsigned F1_CYCLES         = 1,
  parameter int unsigned F1_PHASE_DEG      = 0,
  parameter int unsigned F0_CYCLES         = 1,
  parameter int unsigned F0_PHASE_DEG      = 180,
  parameter int unsigned CLKS_PER_SAMPLE_P = CLKS_PER_SAMPLE,
  parameter int unsigned SAMPLES_PER_BIT_P = SAMPLES_PER_BIT,
  parameter int unsigned DATA_W_P          = DATA_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [DATA_W_P-1:0] d_in,
  output logic [SAMPLE_W-1:0] result,
  output logic                d_out
);

  logic              rom_en;
  logic              bit_en;
  logic [ADDR_W-1:0] address;
  sample_t           q1;
  sample_t           q0;

  control_block #(
    .CLKS_PER_SAMPLE_P(CLKS_PER_SAMPLE_P),
    .SAMPLES_PER_BIT_P(SAMPLES_PER_BIT_P)
  ) u_control (
    .clk          (clk),
    .rst          (rst),
    .rom          (rom_en),
    .bit_separator(bit_en)
  );

  bit_separator #(.DATA_W_P(DATA_W_P)) u_bitsep (
    .clk  (clk),
    .rst  (rst),
    .en   (bit_en),
    .d_in (d_in),
    .d_out(d_out)
  );

  sample_counter #(.MODULUS(SAMPLES_PER_BIT_P), .WIDTH(ADDR_W)) u_counter (
    .clock (clk),
    .rst   (rst),
    .clk_en(rom_en),
    .q     (address)
  );

  carrier_rom #(
    .CYCLES(F1_CYCLES), .PHASE_DEG(F1_PHASE_DEG), .DEPTH(SAMPLES_PER_BIT_P)
  ) u_frequency_1 (
    .clock  (clk),
    .address(address),
    .q      (q1)
  );

  carrier_rom #(
    .CYCLES(F0_CYCLES), .PHASE_DEG(F0_PHASE_DEG), .DEPTH(SAMPLES_PER_BIT_P)
  ) u_frequency_0 (
    .clock  (clk),
    .address(address),
    .q      (q0)
  );

  sample_mux u_mux (
    .data1x(q1),
    .data0x(q0),
    .sel   (d_out),
    .result(result)
  );

  // Every bit starts at sample 0: when the bit strobe fires, the address
  // counter has just wrapped to 0 (or is still 0 after reset).
  a_bit_starts_at_sample0: assert property (@(posedge clk) disable iff (rst)
    bit_en |-> address == '0);

  // The address advances only on the sample strobe.
  a_addr_moves_on_strobe: assert property (@(posedge clk) disable iff (rst)
    !rom_en |=> $stable(address));

endmodule
