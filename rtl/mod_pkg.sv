// mod_pkg: sizes and the carrier-sample formula shared by the ROM-based
// BPSK/BFSK modulators.
//
// One data bit is sent as SAMPLES_PER_BIT carrier samples and every sample is
// held for CLKS_PER_SAMPLE clocks, so a bit lasts 40 x 2 = 80 clocks (1.6 us at
// 50 MHz). The data word is DATA_W = 14 bits wide and each sample is a 32-bit
// IEEE-754 single-precision number. The sizes and rates are those of the
// original design; the float word format is read from the sample words of its
// simulation traces, which the formula below reproduces exactly.
//
// carrier_sample() gives ROM word k of a carrier that makes `cycles` whole
// periods in one bit, started at `phase_deg` degrees:
//     word(k) = float32( sin(2*pi*(cycles*k/SAMPLES_PER_BIT + phase_deg/360)) ).
// The angle is first reduced to a whole number of sample steps j in
// [0, SAMPLES_PER_BIT), so that the zero crossings come out as exact zeros
// (0x00000000), and the second half-period is taken as the negated first
// half, which keeps the table exactly antisymmetric. Phases that are not a
// multiple of 360/SAMPLES_PER_BIT degrees are rounded down to one that is.
// The float conversion rounds the mantissa to nearest.
package mod_pkg;

  localparam int unsigned SAMPLE_W        = 32;
  localparam int unsigned SAMPLES_PER_BIT = 40;
  localparam int unsigned ADDR_W          = 6;
  localparam int unsigned CLKS_PER_SAMPLE = 2;
  localparam int unsigned DATA_W          = 14;

  typedef logic [SAMPLE_W-1:0] sample_t;

  localparam real PI = 3.14159265358979323846;

  // Converts a real into IEEE-754 single precision (normal numbers and zero).
  function automatic sample_t real_to_float32(input real x);
    logic       s;
    real        m;
    int         e;
    int         frac;
    s = (x < 0.0);
    m = s ? -x : x;
    if (m < 1.0e-30) return '0;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    frac = $rtoi((m - 1.0) * 8388608.0 + 0.5);
    if (frac >= 8388608) begin
      frac = 0;
      e++;
    end
    return {s, 8'(e + 127), 23'(frac)};
  endfunction

  // ROM word k of a carrier with `cycles` periods per bit and start phase
  // `phase_deg` degrees.
  function automatic sample_t carrier_sample(input int unsigned cycles,
                                             input int unsigned phase_deg,
                                             input int unsigned k,
                                             input int unsigned n);
    int unsigned j;
    int unsigned half;
    real         v;
    half = n / 2;
    j = (cycles * k + (phase_deg * n) / 360) % n;
    if (j == 0 || j == half) return '0;
    if (j < half) v = $sin(2.0 * PI * real'(j) / real'(n));
    else          v = -$sin(2.0 * PI * real'(j - half) / real'(n));
    return real_to_float32(v);
  endfunction

endpackage
