// tb_sar_sincos: self-checking test of the CORDIC sine/cosine unit.
//
// Feeds one phase per cycle (random phases, the quarter-turn boundaries and
// their neighbours) and checks that each result appears exactly 24 cycles
// later, in order, with its tag, and that sin and cos are within 4e-7 of
// sin(2*pi*phase/2^32) and cos(2*pi*phase/2^32) computed with reals.
module tb_sar_sincos;
  import sar_pkg::*;
  import sar_tb_pkg::*;

  localparam int LAT = 24;
  localparam real TOL = 4.0e-7;
  localparam real TWO_PI = 6.283185307179586;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [31:0] in_phase = '0;
  logic [8:0]  in_tag = '0;
  logic        out_valid;
  f32_t        out_sin, out_cos;
  logic [8:0]  out_tag;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] exp_phase [int];
  logic [8:0]  exp_tag   [int];
  real max_err = 0.0;

  sar_sincos dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    real es, ec;
    cyc <= cyc + 1;
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_phase.exists(cyc)) begin
        failures++;
        $display("FAIL cycle %0d: out_valid=%0d", cyc, out_valid);
      end else if (out_valid) begin
        es = abs_r(f32_to_real(out_sin) - $sin(TWO_PI * exp_phase[cyc] / 4294967296.0));
        ec = abs_r(f32_to_real(out_cos) - $cos(TWO_PI * exp_phase[cyc] / 4294967296.0));
        if (es > max_err) max_err = es;
        if (ec > max_err) max_err = ec;
        checks++;
        if (es > TOL || ec > TOL || out_tag != exp_tag[cyc]) begin
          failures++;
          if (failures < 10)
            $display("FAIL phase %h: sin %h cos %h (err %g %g) tag %0d/%0d",
                     exp_phase[cyc], out_sin, out_cos, es, ec, out_tag, exp_tag[cyc]);
        end
      end
    end
  end

  initial begin
    logic [31:0] corner [8] = '{32'h0, 32'h4000_0000, 32'h8000_0000, 32'hc000_0000,
                                32'h3fff_ffff, 32'h7fff_ffff, 32'hbfff_ffff, 32'hffff_ffff};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i < 8 || $urandom_range(0, 4) != 0) begin
        in_valid = 1;
        in_phase = (i < 8) ? corner[i] : $urandom;
        in_tag   = 9'(i);
        exp_phase[cyc + LAT] = in_phase;
        exp_tag[cyc + LAT]   = in_tag;
      end else begin
        in_valid = 0;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    $display("max abs error %g", max_err);
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
