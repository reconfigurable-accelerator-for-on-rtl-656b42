// fp_add: combinational IEEE-754 adder/subtractor for any exponent/fraction
// width (used in binary32 by the matched filter and the accumulator).
//
// y = a + b, or a - b when sub is 1. The operand of larger magnitude is kept,
// the other one's significand is shifted right to align it, with every bit
// shifted out folded into a sticky bit, and the two are added or subtracted.
// The sum is renormalised with a leading-zero count and rounded to nearest,
// ties to even. Subnormal inputs count as zero and subnormal results are
// flushed to zero; overflow gives infinity; NaN operands or inf - inf give a
// quiet NaN. An exact zero result is +0. No clock: the caller registers.
module fp_add #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  input  logic           sub,
  output logic [EW+MW:0] y
);
  localparam int unsigned SW   = MW + 1;          // significand width
  localparam int unsigned W    = 1 + SW + MW + 3;  // carry + significand + guard bits
  localparam int signed   EMAX = (1 << EW) - 1;

  logic [EW+MW:0] x, z;               // |x| >= |z|
  logic           sx, sz, eff_sub;
  logic [EW-1:0]  ex, ez;
  logic [W-1:0]   xs, zs, zsh, sum, norm;
  logic           sticky;
  int unsigned    d, lz;
  int signed      e;
  logic [MW:0]    frac_r;
  logic           g, st, inc;
  logic           x_zero, z_zero, x_inf, z_inf, x_nan, z_nan;

  always_comb begin
    // Flip b's sign for subtraction, then order the operands by magnitude.
    if (a[EW+MW-1:0] >= b[EW+MW-1:0]) begin
      x = a;
      z = {b[EW+MW] ^ sub, b[EW+MW-1:0]};
    end else begin
      x = {b[EW+MW] ^ sub, b[EW+MW-1:0]};
      z = a;
    end
    sx = x[EW+MW];
    sz = z[EW+MW];
    ex = x[EW+MW-1:MW];
    ez = z[EW+MW-1:MW];
    x_zero = (ex == '0);
    z_zero = (ez == '0);
    x_inf  = (ex == '1) && (x[MW-1:0] == '0);
    z_inf  = (ez == '1) && (z[MW-1:0] == '0);
    x_nan  = (ex == '1) && (x[MW-1:0] != '0);
    z_nan  = (ez == '1) && (z[MW-1:0] != '0);
    eff_sub = sx ^ sz;

    xs = {1'b0, 1'b1, x[MW-1:0], {(MW+3){1'b0}}};
    zs = z_zero ? '0 : {1'b0, 1'b1, z[MW-1:0], {(MW+3){1'b0}}};
    d  = int'(ex) - int'(ez);
    if (d >= W) begin
      zsh    = '0;
      sticky = |zs;
    end else begin
      zsh    = zs >> d;
      sticky = |(zs & ((W'(1) << d) - W'(1)));
    end
    zsh[0] = zsh[0] | sticky;

    sum = eff_sub ? (xs - zsh) : (xs + zsh);

    // Leading-zero count of the sum.
    lz = W;
    for (int i = 0; i < W; i++) begin
      if (sum[i]) lz = W - 1 - i;
    end
    norm = sum << lz;
    // Bit W-1 stands for 2^(ex+1-bias).
    e = int'(ex) + 1 - int'(lz);

    g   = norm[W-2-MW];
    st  = |norm[W-3-MW:0];
    inc = g & (st | norm[W-1-MW]);
    frac_r = {1'b0, norm[W-2 -: MW]} + (MW+1)'(inc);
    if (frac_r[MW]) e = e + 1;

    if (x_nan || z_nan || (x_inf && z_inf && eff_sub)) begin
      y = {1'b0, {EW{1'b1}}, 1'b1, {(MW-1){1'b0}}};
    end else if (x_inf) begin
      y = {sx, {EW{1'b1}}, {MW{1'b0}}};
    end else if (x_zero) begin
      // Both operands are zero (x has the larger magnitude).
      y = {sx & sz, {(EW+MW){1'b0}}};
    end else if (sum == '0 || e <= 0) begin
      y = '0;
    end else if (e >= EMAX) begin
      y = {sx, {EW{1'b1}}, {MW{1'b0}}};
    end else begin
      y = {sx, e[EW-1:0], frac_r[MW-1:0]};
    end
  end
endmodule
