// tb_axis_sar1_full: the accelerator at its default size computing one
// complete image row: 512 pixels, each from 512 range values and 512 complex
// samples, with both streams running without gaps.
//
// Ranges come from a synthetic flight geometry, samples are random complex
// values in [-1, 1]. Every pixel is compared with sum_p s[p]*exp(i*2ku*R[p])
// computed with reals (within 1e-6 of sum_p |s[p]|); TLAST must mark only the
// row's last pixel, and the row must take 512*(2*512+33) cycles.
module tb_axis_sar1_full;
  import sar_pkg::*;
  import sar_tb_pkg::*;

  localparam int N    = N_PULSES_DEF;
  localparam int NPIX = NPIX_X_DEF;
  localparam real TWO_KU = 419.16900439033634;

  logic        clk = 0, rst_n = 0;
  logic [63:0] in_tdata = '0;
  logic        in_tvalid = 0, in_tready;
  logic [63:0] out_tdata;
  logic        out_tvalid, out_tlast;

  axis_sar1_datapath dut (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .strm_in_tdata(in_tdata), .strm_in_tvalid(in_tvalid), .strm_in_tready(in_tready),
    .strm_out_tdata(out_tdata), .strm_out_tvalid(out_tvalid),
    .strm_out_tready(1'b1), .strm_out_tlast(out_tlast)
  );

  always #5 clk = ~clk;

  int  checks = 0, failures = 0, cyc = 0, n_out = 0, t_start = 0, t_end = 0;
  real ref_re [NPIX], ref_im [NPIX], ref_mag [NPIX];
  real worst = 0.0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_tvalid) begin
      real hr, hi, e;
      hr = f32_to_real(out_tdata[31:0]);
      hi = f32_to_real(out_tdata[63:32]);
      e  = (abs_r(hr - ref_re[n_out]) + abs_r(hi - ref_im[n_out])) / ref_mag[n_out];
      if (e > worst) worst = e;
      check(abs_r(hr - ref_re[n_out]) <= 1.0e-6 * ref_mag[n_out] &&
            abs_r(hi - ref_im[n_out]) <= 1.0e-6 * ref_mag[n_out],
            $sformatf("pixel %0d: (%g, %g) expected (%g, %g)", n_out, hr, hi,
                      ref_re[n_out], ref_im[n_out]));
      check(out_tlast == (n_out == NPIX - 1), $sformatf("pixel %0d: tlast %0d", n_out, out_tlast));
      n_out++;
      t_end = cyc;
    end
  end

  initial begin
    real   r [N];
    cplx_t s [N];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    t_start = cyc;
    for (int k = 0; k < NPIX; k++) begin
      ref_re[k] = 0.0; ref_im[k] = 0.0; ref_mag[k] = 0.0;
      for (int p = 0; p < N; p++) begin
        real sr, si, a;
        r[p] = geom_range(p, k, NPIX / 2, N, NPIX);
        s[p] = '{im: real_to_f32(($urandom_range(0, 2000000) - 1000000.0) / 1.0e6),
                 re: real_to_f32(($urandom_range(0, 2000000) - 1000000.0) / 1.0e6)};
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
    while (n_out < NPIX) @(negedge clk);
    // The last pixel's output handshake ends the row.
    check(t_end - t_start == NPIX * (2 * N + 33) - 1,
          $sformatf("row took %0d cycles, expected %0d", t_end - t_start + 1, NPIX * (2 * N + 33)));
    $display("row of %0d pixels in %0d cycles, worst relative error %g", NPIX, t_end - t_start + 1, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPIX * (2 * N + 40) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
