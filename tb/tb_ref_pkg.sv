// tb_ref_pkg: reference values for the modulator testbenches, computed a
// different way from the RTL. The carrier angle is taken as a whole real
// (no reduction to a half period), its sine is evaluated in double precision
// and converted to IEEE-754 single precision from the double's bit pattern
// with round-to-nearest-even. Values within 1e-9 of zero (sin(0), sin(pi))
// are taken as exact zeros, which is how the sample ROMs store zero crossings.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic logic [31:0] ref_float32(input real v);
    logic [63:0] d;
    int          e;
    logic [22:0] m;
    logic        rnd;
    logic        sticky;
    logic [23:0] mr;
    if (v < 1.0e-9 && v > -1.0e-9) return 32'h0;
    d      = $realtobits(v);
    e      = int'(d[62:52]) - 1023 + 127;
    m      = d[51:29];
    rnd    = d[28];
    sticky = |d[27:0];
    mr     = {1'b0, m};
    if (rnd && (sticky || m[0])) mr = mr + 1'b1;
    if (mr[23]) e = e + 1;
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] ref_carrier(input int cycles, input int phase_deg,
                                              input int k, input int n);
    real a;
    a = 2.0 * PI * (real'(cycles) * real'(k) / real'(n) + real'(phase_deg) / 360.0);
    return ref_float32($sin(a));
  endfunction

endpackage
