// sample_mux: two-way sample selector at the modulator output. result is
// data1x while sel (the current data bit) is 1 and data0x while it is 0.
// Purely combinational; port names follow the original schematic.
module sample_mux
  import mod_pkg::SAMPLE_W;
#(
  parameter int unsigned WIDTH = SAMPLE_W
) (
  input  logic [WIDTH-1:0] data1x,
  input  logic [WIDTH-1:0] data0x,
  input  logic             sel,
  output logic [WIDTH-1:0] result
);

  always_comb result = sel ? data1x : data0x;

endmodule
