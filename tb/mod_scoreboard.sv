// mod_scoreboard: cycle-accurate reference model and checker for one ROM
// modulator, shared by the modulator-level testbenches.
//
// It counts rising clock edges since reset was released (edge n = 1, 2, ...).
// After edge n it expects
//   bit number   b = (n-1) / (CPS*SPB),    sample k = ((n-1) % (CPS*SPB)) / CPS,
//   d_out        = bit (b % DW) of the d_in value seen at the first edge of the
//                  current word (least significant bit first),
//   result       = float32(sin(2*pi*(C*k/SPB + P/360))) with (C, P) the
//                  cycles and phase of the carrier for that bit,
// and checks both outputs on the following falling edge. It also counts the
// events a test must see: bits sent, words started, bits after which the
// carrier switched from the 1-carrier to the 0-carrier and back.
module mod_scoreboard
  import tb_ref_pkg::ref_carrier;
#(
  parameter int F1_CYCLES = 1,
  parameter int F1_PHASE  = 0,
  parameter int F0_CYCLES = 1,
  parameter int F0_PHASE  = 180,
  parameter int CPS       = 2,
  parameter int SPB       = 40,
  parameter int DW        = 14,
  parameter bit VERBOSE   = 1'b1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] d_in,
  input  logic [31:0]   result,
  input  logic          d_out,
  output int            checks,
  output int            failures,
  output int            n_bits,
  output int            n_words,
  output int            n_to0,
  output int            n_to1
);

  timeunit 1ns;
  timeprecision 1ps;

  int          n = 0;
  logic [DW-1:0] word = '0;
  logic        exp_bit;
  logic        prev_bit = 1'b0;
  logic [31:0] exp_res;
  int          b, k;

  initial begin
    checks = 0; failures = 0; n_bits = 0; n_words = 0; n_to0 = 0; n_to1 = 0;
  end

  always @(posedge clk) begin
    if (rst) n = 0;
    else begin
      n = n + 1;
      if ((n - 1) % (CPS * SPB * DW) == 0) begin
        word = d_in;
        n_words++;
      end
      if ((n - 1) % (CPS * SPB) == 0) n_bits++;
    end
  end

  always @(negedge clk) begin
    if (!rst && n > 0) begin
      b       = (n - 1) / (CPS * SPB);
      k       = ((n - 1) % (CPS * SPB)) / CPS;
      exp_bit = word[b % DW];
      exp_res = exp_bit ? ref_carrier(F1_CYCLES, F1_PHASE, k, SPB)
                        : ref_carrier(F0_CYCLES, F0_PHASE, k, SPB);
      if ((n - 1) % (CPS * SPB) == 0 && b > 0) begin
        if (prev_bit && !exp_bit) n_to0++;
        if (!prev_bit && exp_bit) n_to1++;
      end
      prev_bit = exp_bit;
      checks++;
      if (d_out !== exp_bit) begin
        failures++;
        if (VERBOSE) $display("FAIL edge %0d (bit %0d): d_out=%b expected %b", n, b, d_out, exp_bit);
      end
      checks++;
      if (result !== exp_res) begin
        failures++;
        if (VERBOSE) $display("FAIL edge %0d (bit %0d sample %0d): result=%h expected %h",
                              n, b, k, result, exp_res);
      end
    end
  end

endmodule
