// sar_tb_pkg: reference arithmetic for the accelerator's testbenches.
//
// Conversions between SystemVerilog real (binary64) and binary32 bit patterns,
// written out bit by bit so that they do not depend on simulator support for
// shortreal. real_to_f32 rounds to nearest, ties to even, and flushes
// subnormal results to zero, as the design does; f32_ulp_diff measures the
// distance between two binary32 values in units in the last place.
package sar_tb_pkg;

  function automatic real f32_to_real(input logic [31:0] b);
    logic [63:0] d;
    if (b[30:23] == 8'd0) return 0.0;
    d = {b[31], 11'(int'(b[30:23]) - 127 + 1023), b[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_f32(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[23]) e = e + 1;
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Correctly rounded binary32 operations, via exact or near-exact binary64.
  function automatic logic [31:0] f32_mul(input logic [31:0] a, input logic [31:0] b);
    return real_to_f32(f32_to_real(a) * f32_to_real(b));
  endfunction

  function automatic logic [31:0] f32_add(input logic [31:0] a, input logic [31:0] b);
    return real_to_f32(f32_to_real(a) + f32_to_real(b));
  endfunction

  function automatic int unsigned f32_ulp_diff(input logic [31:0] a, input logic [31:0] b);
    longint ia, ib;
    ia = a[31] ? -longint'(a[30:0]) : longint'(a[30:0]);
    ib = b[31] ? -longint'(b[30:0]) : longint'(b[30:0]);
    return (ia > ib) ? int'(ia - ib) : int'(ib - ia);
  endfunction

  function automatic real abs_r(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // A random binary32 value of either sign with magnitude in [2^lo, 2^hi).
  function automatic logic [31:0] rand_f32(input int lo, input int hi);
    logic [31:0] b;
    b[31]    = 1'($urandom);
    b[30:23] = 8'(127 + lo + int'($urandom_range(0, hi - lo - 1)));
    b[22:0]  = 23'($urandom);
    return b;
  endfunction

  // Test geometry: range from the platform at pulse p to pixel (ix, iy) of a
  // grid with 0.5 m spacing, the platform flying along x at 5000 m height and
  // 8000 m to the side, 2 m between pulses.
  function automatic real geom_range(input int p, input int ix, input int iy,
                                     input int n_pulses, input int npix);
    real px, py, vx, vy, vz;
    px = (-npix / 2.0 + 0.5 + ix) * 0.5;
    py = (-npix / 2.0 + 0.5 + iy) * 0.5;
    vx = (p - n_pulses / 2.0) * 2.0;
    vy = -8000.0;
    vz = 5000.0;
    return $sqrt((vx - px) * (vx - px) + (vy - py) * (vy - py) + vz * vz);
  endfunction

endpackage
