// fix_to_f32: combinational conversion of a signed fixed-point number to an
// IEEE-754 binary32 bit pattern.
//
// The input is a two's-complement value of W bits with FRAC fractional bits.
// Its magnitude is normalised with a leading-zero count and the 24-bit
// significand is rounded to nearest, ties to even. Zero gives +0. Used to turn
// the CORDIC's fixed-point sine and cosine into the single-precision words
// the matched filter multiplies; W must be at most 64.
module fix_to_f32 #(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 30
) (
  input  logic signed [W-1:0] x,
  output logic        [31:0]  y
);
  localparam int unsigned AW = W + 25;   // room for rounding bits below the input

  logic [AW-1:0] mag, norm;
  logic          s;
  int unsigned   lz;
  int signed     e;
  logic [23:0]   frac_r;
  logic          g, st, inc;

  always_comb begin
    s   = x[W-1];
    mag = {(s ? (~x + W'(1)) : x), 25'd0};
    lz  = AW;
    for (int i = 0; i < AW; i++) begin
      if (mag[i]) lz = AW - 1 - i;
    end
    norm = mag << lz;
    // Top bit of norm is 2^(W-1-FRAC-lz).
    e = int'(W) - 1 - int'(FRAC) - int'(lz) + 127;
    g   = norm[AW-25];
    st  = |norm[AW-26:0];
    inc = g & (st | norm[AW-24]);
    frac_r = {1'b0, norm[AW-2 -: 23]} + 24'(inc);
    if (frac_r[23]) e = e + 1;
    if (mag == '0 || e <= 0) y = '0;
    else                     y = {s, e[7:0], frac_r[22:0]};
  end
endmodule
