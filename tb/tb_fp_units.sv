// tb_fp_units: self-checking test of the binary32 and binary64 multipliers,
// the binary32 adder and the fixed-point to binary32 converter.
//
// Random operands over a wide exponent range are compared with correctly
// rounded results computed from SystemVerilog reals (binary64 products of
// binary32 operands are exact; sums allow one unit in the last place for the
// rare double rounding). Directed cases cover cancellation to zero, equal
// magnitudes, infinities and NaN.
module tb_fp_units;
  import sar_tb_pkg::*;

  int checks = 0, failures = 0;

  logic [31:0] ma, mb, my, aa, ab, ay;
  logic        asub;
  logic [63:0] da, db, dy;
  logic signed [31:0] fx;
  logic [31:0] fy;

  fp_mul #(.EW(8),  .MW(23)) u_mul32 (.a(ma), .b(mb), .y(my));
  fp_mul #(.EW(11), .MW(52)) u_mul64 (.a(da), .b(db), .y(dy));
  fp_add #(.EW(8),  .MW(23)) u_add32 (.a(aa), .b(ab), .sub(asub), .y(ay));
  fix_to_f32 #(.W(32), .FRAC(30)) u_cvt (.x(fx), .y(fy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    real r;
    for (int i = 0; i < 20000; i++) begin
      ma = rand_f32(-20, 20);
      mb = rand_f32(-20, 20);
      aa = rand_f32(-10, 10);
      ab = (i % 4 == 0) ? {~aa[31], aa[30:23], 23'($urandom)} : rand_f32(-10, 10);
      asub = 1'($urandom);
      da = $realtobits(($urandom_range(0, 1000000) - 500000.0) * 0.0371 + 1.0e-3);
      db = $realtobits(($urandom_range(1, 1000000)) * 1.0e-3);
      fx = signed'($urandom_range(0, 32'h7fff_ffff)) - 32'sh4000_0000;
      #1;
      check(my == f32_mul(ma, mb), $sformatf("mul32 %h*%h=%h", ma, mb, my));
      check(f32_ulp_diff(ay, asub ? f32_add(aa, {~ab[31], ab[30:0]}) : f32_add(aa, ab)) <= 1,
            $sformatf("add32 %h %h sub=%0d -> %h", aa, ab, asub, ay));
      r = $bitstoreal(da) * $bitstoreal(db);
      check(dy == $realtobits(r), $sformatf("mul64 %h*%h=%h", da, db, dy));
      check(fy == real_to_f32(real'(fx) / 1073741824.0), $sformatf("cvt %h -> %h", fx, fy));
    end
    // Directed cases.
    aa = 32'h3f80_0000; ab = 32'h3f80_0000; asub = 1; #1;
    check(ay == 32'h0, "1-1 = +0");
    aa = 32'h3f80_0000; ab = 32'h3380_0000; asub = 0; #1;   // 1 + 2^-24: tie, stays 1
    check(ay == 32'h3f80_0000, "tie to even");
    aa = 32'h3f80_0001; ab = 32'h3380_0000; asub = 0; #1;   // tie rounds up to even
    check(ay == 32'h3f80_0002, "tie to even up");
    aa = 32'h7f80_0000; ab = 32'h7f80_0000; asub = 1; #1;
    check(ay[30:23] == 8'hff && ay[22:0] != 0, "inf-inf = NaN");
    ma = 32'h7f00_0000; mb = 32'h7f00_0000; #1;
    check(my == 32'h7f80_0000, "overflow to inf");
    ma = 32'h0080_0000; mb = 32'h0080_0000; #1;
    check(my == 32'h0, "underflow flushes to zero");
    fx = 32'sh4000_0000; #1;
    check(fy == 32'h3f80_0000, "cvt 1.0");
    fx = -32'sh2000_0000; #1;
    check(fy == 32'hbf00_0000, "cvt -0.5");
    fx = 0; #1;
    check(fy == 32'h0, "cvt 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
