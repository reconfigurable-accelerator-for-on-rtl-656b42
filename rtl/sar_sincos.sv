// sar_sincos: pipelined CORDIC producing sin and cos of a phase, as binary32.
//
// The accelerator computes sine and cosine with a CORDIC core that takes 24
// clock cycles; this module is a CORDIC of that length, one rotation per
// pipeline stage. Its number format and range reduction are this design's
// choices:
//  * The phase is an unsigned PW-bit fraction of a full turn.
//  * Phases in the second and third quarter turn are moved by half a turn into
//    [-1/4, 1/4) turn and both results are negated at the end, so that every
//    rotation stays within the CORDIC's convergence range.
//  * x and y are signed 32-bit values with 30 fractional bits; x starts at the
//    CORDIC gain 0.60725293 so the outputs need no scaling. The residual angle
//    z is kept in turns (2^32 = one turn); stage i rotates by
//    atan(2^-i)/(2*pi)*2^32, rounded, the table ATAN below.
//  * After the last stage x and y are converted to binary32 (round to nearest)
//    without another register.
// Timing: ITER register stages, so out_valid/out_sin/out_cos follow
// in_valid/in_phase by ITER cycles (24 at the default), one result per cycle.
// in_tag travels with the data.
module sar_sincos
  import sar_pkg::*;
#(
  parameter int unsigned ITER  = CORDIC_ITER,
  parameter int unsigned TAG_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      in_phase,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output f32_t             out_sin,
  output f32_t             out_cos,
  output logic [TAG_W-1:0] out_tag
);
  // atan(2^-i) / (2*pi) * 2^32, i = 0..23
  localparam logic [31:0] ATAN [24] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81
  };
  // 1/prod(sqrt(1+2^-2i)) * 2^30
  localparam logic signed [31:0] GAIN = 32'sd652032874;

  typedef struct packed {
    logic              valid;
    logic              neg;
    logic signed [31:0] x;
    logic signed [31:0] y;
    logic signed [31:0] z;
    logic [TAG_W-1:0]   tag;
  } stage_t;

  stage_t st_d [ITER];   // combinational result of each rotation
  stage_t st_q [ITER];   // pipeline registers
  stage_t st0;

  // Quadrant fold: bring the phase into [-1/4, 1/4) turn.
  always_comb begin
    st0.valid = in_valid;
    st0.tag   = in_tag;
    st0.x     = GAIN;
    st0.y     = '0;
    st0.neg   = in_phase[31] ^ in_phase[30];
    st0.z     = st0.neg ? signed'(in_phase - 32'h8000_0000) : signed'(in_phase);
  end

  for (genvar i = 0; i < ITER; i++) begin : g_rot
    stage_t prev;
    if (i == 0) begin : g_first
      assign prev = st0;
    end else begin : g_next
      assign prev = st_q[i-1];
    end
    always_comb begin
      st_d[i] = prev;
      if (!prev.z[31]) begin
        st_d[i].x = prev.x - (prev.y >>> i);
        st_d[i].y = prev.y + (prev.x >>> i);
        st_d[i].z = prev.z - signed'(ATAN[i]);
      end else begin
        st_d[i].x = prev.x + (prev.y >>> i);
        st_d[i].y = prev.y - (prev.x >>> i);
        st_d[i].z = prev.z + signed'(ATAN[i]);
      end
    end
    always_ff @(posedge clk) begin
      if (!rst_n) st_q[i].valid <= 1'b0;
      else        st_q[i].valid <= st_d[i].valid;
      st_q[i].neg <= st_d[i].neg;
      st_q[i].x   <= st_d[i].x;
      st_q[i].y   <= st_d[i].y;
      st_q[i].z   <= st_d[i].z;
      st_q[i].tag <= st_d[i].tag;
    end
  end

  logic signed [31:0] cos_fx, sin_fx;
  assign cos_fx = st_q[ITER-1].neg ? -st_q[ITER-1].x : st_q[ITER-1].x;
  assign sin_fx = st_q[ITER-1].neg ? -st_q[ITER-1].y : st_q[ITER-1].y;

  fix_to_f32 #(.W(32), .FRAC(30)) u_cvt_cos (.x(cos_fx), .y(out_cos));
  fix_to_f32 #(.W(32), .FRAC(30)) u_cvt_sin (.x(sin_fx), .y(out_sin));

  assign out_valid = st_q[ITER-1].valid;
  assign out_tag   = st_q[ITER-1].tag;

  initial assert (ITER >= 1 && ITER <= 24)
    else $error("sar_sincos: ITER must lie in 1..24");
endmodule
