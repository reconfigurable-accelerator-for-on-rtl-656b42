// tb_sar_point_target: forms a small SAR image of one point target with the
// accelerator at its default 512 pulses per pixel.
//
// The testbench plays the host: it synthesises range-compressed echoes of a
// point reflector for 512 pulses (512 range bins of 0.25 m per pulse, a sinc
// response with the round-trip phase exp(-i*2*ku*R)), and for each pixel of a
// 16 x 16 grid (0.5 m spacing) it computes the ranges, picks the two
// neighbouring bins and interpolates the sample linearly, then streams ranges
// and samples to the accelerator. Each pixel is checked against a binary64
// BackProjection of the same samples, and the image must focus: the brightest
// pixel is the target's, with at least ten times the magnitude of any pixel
// two or more cells away. Output TLAST must close each 16-pixel row.
module tb_sar_point_target;
  import sar_pkg::*;
  import sar_tb_pkg::*;

  localparam int  N      = N_PULSES_DEF;
  localparam int  NPIX   = 16;
  localparam int  NBIN   = 512;
  localparam real DR     = 0.25;
  localparam real TWO_KU = 419.16900439033634;
  localparam real PI     = 3.141592653589793;
  localparam int  TX = 9, TY = 6;          // target pixel

  logic        clk = 0, rst_n = 0;
  logic [63:0] in_tdata = '0;
  logic        in_tvalid = 0, in_tready;
  logic [63:0] out_tdata;
  logic        out_tvalid, out_tready, out_tlast;

  axis_sar1_datapath #(.NPIX_X(NPIX)) dut (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .strm_in_tdata(in_tdata), .strm_in_tvalid(in_tvalid), .strm_in_tready(in_tready),
    .strm_out_tdata(out_tdata), .strm_out_tvalid(out_tvalid),
    .strm_out_tready(out_tready), .strm_out_tlast(out_tlast)
  );

  always #5 clk = ~clk;
  assign out_tready = 1'b1;

  int  checks = 0, failures = 0, n_out = 0;
  real ref_re [NPIX*NPIX], ref_im [NPIX*NPIX], ref_mag [NPIX*NPIX];
  real img [NPIX*NPIX];
  real r0;
  // Echo data g(p, bin), complex binary32.
  cplx_t g [N][NBIN];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic real sinc(input real x);
    return (abs_r(x) < 1.0e-9) ? 1.0 : $sin(PI * x) / (PI * x);
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_tvalid) begin
      real hr, hi;
      hr = f32_to_real(out_tdata[31:0]);
      hi = f32_to_real(out_tdata[63:32]);
      img[n_out] = $sqrt(hr * hr + hi * hi);
      check(abs_r(hr - ref_re[n_out]) <= 1.0e-6 * ref_mag[n_out] + 1.0e-6 &&
            abs_r(hi - ref_im[n_out]) <= 1.0e-6 * ref_mag[n_out] + 1.0e-6,
            $sformatf("pixel %0d: (%g, %g) expected (%g, %g)", n_out, hr, hi,
                      ref_re[n_out], ref_im[n_out]));
      check(out_tlast == ((n_out % NPIX) == NPIX - 1), $sformatf("pixel %0d tlast", n_out));
      n_out++;
    end
  end

  initial begin
    real   r [N];
    cplx_t s [N];
    real   peak, side;
    int    ipeak;
    // Echoes: range-compressed response of a unit reflector at pixel (TX, TY).
    r0 = geom_range(N / 2, TX, TY, N, NPIX) - NBIN / 2 * DR;
    for (int p = 0; p < N; p++) begin
      real rt;
      rt = geom_range(p, TX, TY, N, NPIX);
      for (int b = 0; b < NBIN; b++) begin
        real a;
        a = sinc((r0 + b * DR - rt) / DR);
        g[p][b] = '{re: real_to_f32(a * $cos(TWO_KU * rt)), im: real_to_f32(-a * $sin(TWO_KU * rt))};
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int k = 0; k < NPIX * NPIX; k++) begin
      ref_re[k] = 0.0; ref_im[k] = 0.0; ref_mag[k] = 0.0;
      for (int p = 0; p < N; p++) begin
        real bin, w, sr, si, a;
        int  bf;
        r[p] = geom_range(p, k % NPIX, k / NPIX, N, NPIX);
        bin  = (r[p] - r0) / DR;
        bf   = int'($floor(bin));
        w    = bin - bf;
        if (bf < 0 || bf >= NBIN - 1) begin
          s[p] = '0;
        end else begin
          s[p].re = real_to_f32((1.0 - w) * f32_to_real(g[p][bf].re) + w * f32_to_real(g[p][bf + 1].re));
          s[p].im = real_to_f32((1.0 - w) * f32_to_real(g[p][bf].im) + w * f32_to_real(g[p][bf + 1].im));
        end
        sr = f32_to_real(s[p].re);
        si = f32_to_real(s[p].im);
        a  = TWO_KU * r[p];
        ref_re[k]  += sr * $cos(a) - si * $sin(a);
        ref_im[k]  += si * $cos(a) + sr * $sin(a);
        ref_mag[k] += $sqrt(sr * sr + si * si);
      end
      for (int j = 0; j < 2 * N; j++) begin
        in_tvalid = 1;
        in_tdata  = (j < N) ? $realtobits(r[j]) : s[j - N];
        @(posedge clk);
        while (!in_tready) @(posedge clk);
        @(negedge clk);
      end
      in_tvalid = 0;
    end
    while (n_out < NPIX * NPIX) @(negedge clk);
    // Focus: peak at the target, sidelobes two cells away well below it.
    peak = 0.0; ipeak = 0; side = 0.0;
    for (int k = 0; k < NPIX * NPIX; k++) if (img[k] > peak) begin peak = img[k]; ipeak = k; end
    for (int k = 0; k < NPIX * NPIX; k++) begin
      int dx, dy;
      dx = k % NPIX - TX; dy = k / NPIX - TY;
      if ((dx > 1 || dx < -1 || dy > 1 || dy < -1) && img[k] > side) side = img[k];
    end
    check(ipeak == TY * NPIX + TX, $sformatf("peak at pixel %0d, expected %0d", ipeak, TY * NPIX + TX));
    check(peak > 10.0 * side, $sformatf("peak %g, strongest pixel two cells away %g", peak, side));
    $display("point target: peak %g at (%0d, %0d), strongest pixel two or more cells away %g",
             peak, ipeak % NPIX, ipeak / NPIX, side);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPIX * NPIX * (2 * N + 40) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
