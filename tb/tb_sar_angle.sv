// tb_sar_angle: self-checking test of the angle unit.
//
// Streams range values (random, positive and negative, plus a few exact ones)
// one per cycle with random gaps and checks, three cycles after each, the
// phase floor(frac(R*2ku/(2*pi)) * 2^32) computed with binary64 reals in the
// same two correctly rounded steps, and the tag carried with it.
module tb_sar_angle;
  import sar_pkg::*;

  localparam int LAT = 3;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  f64_t        in_r = '0;
  logic [8:0]  in_tag = '0;
  logic        out_valid;
  logic [31:0] out_phase;
  logic [8:0]  out_tag;

  int checks = 0, failures = 0;

  sar_angle dut (.*);

  always #5 clk = ~clk;

  // Expected outputs, indexed by the cycle they must appear in.
  logic [31:0] exp_phase [int];
  logic [8:0]  exp_tag   [int];
  int cyc = 0;

  function automatic logic [31:0] ref_phase(input real r);
    real ang, turns, fr;
    ang   = r * $bitstoreal(TWO_KU_DEF);
    turns = ang * $bitstoreal(INV_2PI);
    fr    = turns - $floor(turns);
    return 32'(longint'($floor(fr * 4294967296.0)) & 64'hffff_ffff);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_phase.exists(cyc)) begin
        failures++;
        $display("FAIL cycle %0d: out_valid=%0d", cyc, out_valid);
      end else if (out_valid) begin
        checks++;
        if (out_phase != exp_phase[cyc] || out_tag != exp_tag[cyc]) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d: phase %h tag %0d, expected %h tag %0d",
                     cyc, out_phase, out_tag, exp_phase[cyc], exp_tag[cyc]);
        end
      end
    end
  end

  initial begin
    real r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) != 0) begin
        case (i % 7)
          0:       r = -($urandom_range(1, 100000) * 0.173);
          1:       r = 0.0;
          2:       r = real'($urandom_range(1, 50));
          default: r = 1000.0 + $urandom_range(0, 1 << 30) * 1.3e-5;
        endcase
        in_valid = 1;
        in_r     = $realtobits(r);
        in_tag   = 9'($urandom);
        exp_phase[cyc + LAT] = (r == 0.0) ? 32'd0 : ref_phase(r);
        exp_tag[cyc + LAT]   = in_tag;
      end else begin
        in_valid = 0;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
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
