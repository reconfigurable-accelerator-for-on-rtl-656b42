// fp_mul: combinational IEEE-754 multiplier for any exponent/fraction width.
//
// The datapath multiplies in binary64 (EW=11, MW=52) when it forms the angle
// from a range value, and in binary32 (EW=8, MW=23) in the matched filter.
// The two significands (with their hidden ones) are multiplied exactly, the
// product is normalised by at most one place and rounded to nearest, ties to
// even. Subnormal inputs are treated as zero and results that would be
// subnormal are flushed to zero, as FPGA floating-point cores commonly do;
// an overflow gives infinity, and a NaN input or 0*inf gives a quiet NaN.
// Interface: operands a, b, result y, all raw bit patterns; no clock.
module fp_mul #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] y
);
  localparam int unsigned    SW   = MW + 1;                 // significand width
  localparam int signed      BIAS = (1 << (EW - 1)) - 1;
  localparam int signed      EMAX = (1 << EW) - 1;

  logic              sa, sb, sy;
  logic [EW-1:0]     ea, eb;
  logic [SW-1:0]     ma, mb;
  logic [2*SW-1:0]   prod;
  logic [2*SW-1:0]   norm;
  logic [MW:0]       frac_r;     // rounded fraction with carry
  logic              g, st, inc;
  logic              a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  int signed         e;

  always_comb begin
    sa = a[EW+MW];
    sb = b[EW+MW];
    ea = a[EW+MW-1:MW];
    eb = b[EW+MW-1:MW];
    sy = sa ^ sb;
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == '1) && (a[MW-1:0] == '0);
    b_inf  = (eb == '1) && (b[MW-1:0] == '0);
    a_nan  = (ea == '1) && (a[MW-1:0] != '0);
    b_nan  = (eb == '1) && (b[MW-1:0] != '0);
    ma = {1'b1, a[MW-1:0]};
    mb = {1'b1, b[MW-1:0]};
    prod = ma * mb;
    // Product lies in [1,4): bring the leading one to the top bit.
    e = int'(ea) + int'(eb) - BIAS;
    if (prod[2*SW-1]) begin
      norm = prod;
      e    = e + 1;
    end else begin
      norm = prod << 1;
    end
    // norm[2*SW-1] is the hidden one, the next MW bits the fraction.
    g   = norm[2*SW-2-MW];
    st  = |norm[2*SW-3-MW:0];
    inc = g & (st | norm[2*SW-1-MW]);
    frac_r = {1'b0, norm[2*SW-2 -: MW]} + (MW+1)'(inc);
    if (frac_r[MW]) e = e + 1;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = {1'b0, {EW{1'b1}}, 1'b1, {(MW-1){1'b0}}};
    end else if (a_inf || b_inf) begin
      y = {sy, {EW{1'b1}}, {MW{1'b0}}};
    end else if (a_zero || b_zero || e <= 0) begin
      y = {sy, {(EW+MW){1'b0}}};
    end else if (e >= EMAX) begin
      y = {sy, {EW{1'b1}}, {MW{1'b0}}};
    end else begin
      y = {sy, e[EW-1:0], frac_r[MW-1:0]};
    end
  end
endmodule
