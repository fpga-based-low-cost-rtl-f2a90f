// sample_counter: the ROM address counter, an up counter of modulus
// SAMPLES_PER_BIT (40) with a count enable, as the library counter of the
// original schematic. q advances by one on each clock with clk_en high and
// wraps from MODULUS-1 to 0; it holds otherwise. q is shared by both sample
// ROMs. The synchronous reset `rst` (active high, to 0) is this design's
// addition.
module sample_counter
  import mod_pkg::SAMPLES_PER_BIT, mod_pkg::ADDR_W;
#(
  parameter int unsigned MODULUS = SAMPLES_PER_BIT,
  parameter int unsigned WIDTH   = ADDR_W
) (
  input  logic             clock,
  input  logic             rst,
  input  logic             clk_en,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clock) begin
    if (rst)                              q <= '0;
    else if (clk_en) begin
      if (q == WIDTH'(MODULUS-1))         q <= '0;
      else                                q <= q + 1'b1;
    end
  end

endmodule
