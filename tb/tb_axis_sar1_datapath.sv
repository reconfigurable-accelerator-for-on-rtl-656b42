// tb_axis_sar1_datapath: end-to-end test of the accelerator at reduced size
// (16 pulses per pixel, 3 pixels per row, 12 pixels).
//
// For each pixel the driver streams the ranges of a synthetic flight geometry,
// then random complex samples. Some pixels run clean (no gaps, output always
// ready); the others get random input gaps and output back-pressure. Each
// pixel value is compared with sum_p s[p]*exp(i*2ku*R[p]) computed with reals,
// within 1e-6 of sum_p |s[p]|. The test also checks the row TLAST, the pixel
// period 2*N+33 cycles on clean pixels, and counts how often each mechanism
// happened: input gaps, input refused while the accelerator drains or
// outputs, drain waits, output back-pressure and row ends.
module tb_axis_sar1_datapath;
  import sar_pkg::*;
  import sar_tb_pkg::*;

  localparam int N    = 16;
  localparam int NPIX = 3;
  localparam int NUM  = 12;
  localparam real TWO_KU = 419.16900439033634;

  logic        clk = 0, rst_n = 0;
  logic [63:0] in_tdata = '0;
  logic        in_tvalid = 0, in_tready;
  logic [63:0] out_tdata;
  logic        out_tvalid, out_tready = 0, out_tlast;

  axis_sar1_datapath #(.N_PULSES(N), .NPIX_X(NPIX)) dut (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .strm_in_tdata(in_tdata), .strm_in_tvalid(in_tvalid), .strm_in_tready(in_tready),
    .strm_out_tdata(out_tdata), .strm_out_tvalid(out_tvalid),
    .strm_out_tready(out_tready), .strm_out_tlast(out_tlast)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_gap = 0, n_refused = 0, n_drain = 0, n_backpressure = 0, n_row_end = 0;
  real  ref_re [NUM], ref_im [NUM], ref_mag [NUM];
  bit   clean [NUM];
  int   t_first [NUM];
  int   n_out = 0;
  int   beats = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Monitor: outputs, counters, first-beat times.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.state == S_DRAIN) n_drain++;
      if (in_tvalid && !in_tready) n_refused++;
      if (out_tvalid && !out_tready) n_backpressure++;
      if (in_tvalid && in_tready) begin
        if (beats % (2 * N) == 0) t_first[beats / (2 * N)] = cyc;
        beats++;
      end
      if (out_tvalid && out_tready) begin
        real hr, hi, tol;
        hr  = f32_to_real(out_tdata[31:0]);
        hi  = f32_to_real(out_tdata[63:32]);
        tol = 1.0e-6 * ref_mag[n_out];
        check(abs_r(hr - ref_re[n_out]) <= tol && abs_r(hi - ref_im[n_out]) <= tol,
              $sformatf("pixel %0d: (%g, %g) expected (%g, %g)", n_out, hr, hi,
                        ref_re[n_out], ref_im[n_out]));
        check(out_tlast == ((n_out % NPIX) == NPIX - 1),
              $sformatf("pixel %0d: tlast %0d", n_out, out_tlast));
        if (out_tlast) n_row_end++;
        if (clean[n_out])
          check(cyc - t_first[n_out] == 2 * N + 32,
                $sformatf("pixel %0d: %0d cycles from first beat to output, expected %0d",
                          n_out, cyc - t_first[n_out], 2 * N + 32));
        n_out++;
      end
    end
  end

  // Output ready: always on clean pixels, random otherwise.
  always @(negedge clk)
    out_tready <= (n_out < NUM && clean[n_out]) ? 1'b1 : 1'($urandom_range(0, 2) == 0);

  task automatic send(input logic [63:0] d, input bit gaps);
    while (gaps && $urandom_range(0, 3) == 0) begin
      in_tvalid = 0;
      @(negedge clk);
      n_gap++;
    end
    in_tvalid = 1;
    in_tdata  = d;
    @(posedge clk);
    while (!in_tready) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    real   r [N];
    cplx_t s [N];
    for (int k = 0; k < NUM; k++) clean[k] = (k % 3 == 0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int k = 0; k < NUM; k++) begin
      ref_re[k] = 0.0; ref_im[k] = 0.0; ref_mag[k] = 0.0;
      for (int p = 0; p < N; p++) begin
        real sr, si, a;
        r[p] = geom_range(p, k % NPIX, k / NPIX, N, NPIX);
        s[p] = '{im: real_to_f32(($urandom_range(0, 2000000) - 1000000.0) / 1.0e6),
                 re: real_to_f32(($urandom_range(0, 2000000) - 1000000.0) / 1.0e6)};
        sr = f32_to_real(s[p].re);
        si = f32_to_real(s[p].im);
        a  = TWO_KU * r[p];
        ref_re[k]  += sr * $cos(a) - si * $sin(a);
        ref_im[k]  += si * $cos(a) + sr * $sin(a);
        ref_mag[k] += $sqrt(sr * sr + si * si);
      end
      // Clean pixels wait for the accelerator to be ready before starting.
      if (clean[k]) begin
        in_tvalid = 0;
        while (dut.state != S_RANGE) @(negedge clk);
      end
      for (int p = 0; p < N; p++) send($realtobits(r[p]), !clean[k]);
      for (int p = 0; p < N; p++) send(s[p], !clean[k]);
    end
    in_tvalid = 0;
    while (n_out < NUM) @(negedge clk);
    check(n_gap > 0,          "input gaps happened");
    check(n_refused > 0,      "input refused outside RANGE/SAMPLE happened");
    check(n_drain > 0,        "drain waits happened");
    check(n_backpressure > 0, "output back-pressure happened");
    check(n_row_end == NUM / NPIX, "one row end per row");
    $display("mechanisms: gaps=%0d refused=%0d drain_cycles=%0d backpressure=%0d row_ends=%0d",
             n_gap, n_refused, n_drain, n_backpressure, n_row_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
