// sar_angle: angle computation of the BackProjection accelerator.
//
// For every range value R (binary64) it forms the matched-filter angle
// 2*ku*R, as the accelerator's first loop does, and reduces it to a phase for
// the sine/cosine unit. The reduction is this design's own choice: the angle
// is multiplied by 1/(2*pi) (again in binary64), and the fractional part of
// the resulting number of turns is taken as an unsigned PHASE_W-bit fraction
// of a full turn (rounded down). A binary64 angle keeps about 2^-30 turn of
// resolution even for angles of millions of radians, which is why the range
// arrives in double precision.
//
// Pipeline: three register stages, no stall. in_valid/in_r enter; out_valid
// and out_phase appear three clock cycles later. in_tag (the pulse index) is
// carried along unchanged. Synchronous active-low reset clears the valids.
module sar_angle
  import sar_pkg::*;
#(
  parameter f64_t        TWO_KU  = TWO_KU_DEF,
  parameter int unsigned PW      = PHASE_W,
  parameter int unsigned TAG_W   = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  f64_t             in_r,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [PW-1:0]    out_phase,
  output logic [TAG_W-1:0] out_tag
);
  f64_t             angle_c, turns_c;
  f64_t             angle_q, turns_q;
  logic             v1, v2;
  logic [TAG_W-1:0] t1, t2;

  // Stage 1: angle = 2*ku*R
  fp_mul #(.EW(11), .MW(52)) u_mul_ku  (.a(in_r),    .b(TWO_KU),  .y(angle_c));
  // Stage 2: turns = angle / (2*pi)
  fp_mul #(.EW(11), .MW(52)) u_mul_inv (.a(angle_q), .b(INV_2PI), .y(turns_c));

  // Stage 3: fractional part of the turns as a fixed-point phase.
  // turns = sig * 2^(e-1075), sig = {1,frac}; phase = turns*2^PW mod 2^PW.
  logic [PW-1:0] phase_c;
  logic [52:0]   sig;
  logic          lost;      // nonzero bits below the phase's last place
  int signed     sh;
  always_comb begin
    sig  = {1'b1, turns_q[51:0]};
    sh   = int'(turns_q[62:52]) - 1075 + int'(PW);
    lost = 1'b0;
    if (turns_q[62:52] == '0) begin
      phase_c = '0;
    end else if (sh >= 0) begin
      phase_c = (sh >= int'(PW)) ? '0 : PW'(sig << sh);
    end else if (sh <= -53) begin
      phase_c = '0;
      lost    = 1'b1;
    end else begin
      phase_c = PW'(sig >> (-sh));
      lost    = |(sig & ((53'(1) << (-sh)) - 53'(1)));
    end
    // A negative number of turns wraps to the complementary phase; with the
    // truncation this rounds the phase down (towards minus infinity) in
    // both cases.
    if (turns_q[63]) phase_c = -phase_c - PW'(lost);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
    angle_q   <= angle_c;
    t1        <= in_tag;
    turns_q   <= turns_c;
    t2        <= t1;
    out_phase <= phase_c;
    out_tag   <= t2;
  end
endmodule
