// hub_pkg: constants and constant functions shared by the HUB CORDIC QR blocks.
//
// Number format used throughout: a HUB (half-unit biased) fixed-point number has
// WIDTH explicit two's-complement bits x and an implicit least significant bit that is
// always one, so its value is (x + 1/2) * 2^-FRAC. Truncating an exact result to this
// grid gives the nearest HUB number, which is why every datapath block below rounds to
// nearest while only truncating. FRAC = WIDTH - INT_BITS leaves a sign bit and two
// integer bits (INT_BITS = 3), which is this design's choice.
package hub_pkg;

  // Sign plus integer bits in front of the binary point.
  localparam int INT_BITS = 3;

  // CORDIC gain after n iterations with shifts 0 .. n-1: prod sqrt(1 + 2^-2i).
  function automatic real cordic_gain(input int n);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k * $sqrt(1.0 + 2.0 ** (-2.0 * i));
    return k;
  endfunction

  // Compensation constant 1/gain as an unsigned integer with kf fraction bits,
  // rounded to nearest.
  function automatic longint unsigned kinv_const(input int n, input int kf);
    return longint'((2.0 ** kf) / cordic_gain(n));
  endfunction

endpackage
