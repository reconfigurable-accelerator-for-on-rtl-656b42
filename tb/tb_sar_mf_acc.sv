// tb_sar_mf_acc: self-checking test of the matched filter and accumulator.
//
// Sends pixels of random length (1 to 40 pulses), some back to back, with
// random gaps between pulses. Each pulse carries cos/sin of a random angle
// and a random complex sample. The expected pixel is formed with the same
// sequence of correctly rounded binary32 operations (four products, two
// sums, accumulation); the result must match within one unit in the last
// place and appear exactly three cycles after the pixel's last pulse.
module tb_sar_mf_acc;
  import sar_pkg::*;
  import sar_tb_pkg::*;

  localparam int LAT = 3;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_last = 0;
  f32_t  in_cos = '0, in_sin = '0;
  cplx_t in_sample = '0;
  logic  out_valid;
  cplx_t out_pixel;

  int checks = 0, failures = 0, cyc = 0;
  cplx_t exp_pix [int];

  sar_mf_acc dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_pix.exists(cyc)) begin
        failures++;
        $display("FAIL cycle %0d: out_valid=%0d", cyc, out_valid);
      end else if (out_valid) begin
        checks++;
        if (f32_ulp_diff(out_pixel.re, exp_pix[cyc].re) > 1 ||
            f32_ulp_diff(out_pixel.im, exp_pix[cyc].im) > 1) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d: pixel %h %h expected %h %h", cyc,
                     out_pixel.re, out_pixel.im, exp_pix[cyc].re, exp_pix[cyc].im);
        end
      end
    end
  end

  initial begin
    cplx_t acc;
    logic [31:0] re, im, ps;
    real a;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pix = 0; pix < 300; pix++) begin
      int n;
      n = $urandom_range(1, 40);
      acc = '0;
      for (int p = 0; p < n; p++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0 && pix % 5 != 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        a = $urandom * 1.4629180792671596e-9;   // [0, 2*pi)
        in_valid  = 1;
        in_last   = (p == n - 1);
        in_cos    = real_to_f32($cos(a));
        in_sin    = real_to_f32($sin(a));
        in_sample = '{im: rand_f32(-8, 8), re: rand_f32(-8, 8)};
        ps = f32_mul(in_sin, in_sample.im);
        re = f32_add(f32_mul(in_cos, in_sample.re), {~ps[31], ps[30:0]});
        im = f32_add(f32_mul(in_cos, in_sample.im), f32_mul(in_sin, in_sample.re));
        acc.re = f32_add(acc.re, re);
        acc.im = f32_add(acc.im, im);
        if (in_last) exp_pix[cyc + LAT] = acc;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
