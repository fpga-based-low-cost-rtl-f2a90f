// bpsk_bfsk_top: the BPSK and the BFSK modulator side by side on one clock.
// The two are independent copies of the same ROM modulator that differ only in
// their ROM contents; each has its own 14-bit data input, 32-bit sample output
// and current-bit output. They share clk and the synchronous reset rst, so
// their bit and sample timing is identical (80 clocks per bit, 2 clocks per
// sample).
module bpsk_bfsk_top
  import mod_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [DATA_W-1:0]   bpsk_d_in,
  output logic [SAMPLE_W-1:0] bpsk_result,
  output logic                bpsk_d_out,
  input  logic [DATA_W-1:0]   bfsk_d_in,
  output logic [SAMPLE_W-1:0] bfsk_result,
  output logic                bfsk_d_out
);

  bpsk_modulator u_bpsk (
    .clk   (clk),
    .rst   (rst),
    .d_in  (bpsk_d_in),
    .result(bpsk_result),
    .d_out (bpsk_d_out)
  );

  bfsk_modulator u_bfsk (
    .clk   (clk),
    .rst   (rst),
    .d_in  (bfsk_d_in),
    .result(bfsk_result),
    .d_out (bfsk_d_out)
  );

endmodule
