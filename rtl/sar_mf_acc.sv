// sar_mf_acc: matched filter and accumulator of the BackProjection accelerator.
//
// For each pulse of a pixel it multiplies the stored matched-filter term
// (cos + i*sin) by the pulse's complex sample and adds the product to the
// pixel's running sum, all in binary32:
//   re = cos*s.re - sin*s.im,  im = cos*s.im + sin*s.re,  acc += (re, im).
// The accumulator holds a single running sum, so a pulse can enter every
// clock cycle. How the arithmetic is split into stages is this design's
// choice:
//   stage 1  four products (registered)
//   stage 2  the two sums of products (registered)
//   stage 3  the accumulator register, added into combinationally.
// Interface: in_valid with in_cos, in_sin, in_sample; in_last marks the
// pixel's final pulse. Three cycles after that pulse enters, out_valid pulses
// for one cycle with out_pixel, the complete sum, and the accumulator starts
// again from zero for the next pixel.
module sar_mf_acc
  import sar_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_last,
  input  f32_t  in_cos,
  input  f32_t  in_sin,
  input  cplx_t in_sample,
  output logic  out_valid,
  output cplx_t out_pixel
);
  f32_t  p_cr, p_ci, p_sr, p_si;        // products, combinational
  f32_t  q_cr, q_ci, q_sr, q_si;        // products, registered
  f32_t  m_re, m_im;                    // matched-filter result, combinational
  cplx_t m_q;                           // matched-filter result, registered
  cplx_t acc, acc_next;
  logic  v1, l1, v2, l2;

  fp_mul u_mul_cr (.a(in_cos), .b(in_sample.re), .y(p_cr));
  fp_mul u_mul_ci (.a(in_cos), .b(in_sample.im), .y(p_ci));
  fp_mul u_mul_sr (.a(in_sin), .b(in_sample.re), .y(p_sr));
  fp_mul u_mul_si (.a(in_sin), .b(in_sample.im), .y(p_si));

  fp_add u_add_re (.a(q_cr), .b(q_si), .sub(1'b1), .y(m_re));
  fp_add u_add_im (.a(q_ci), .b(q_sr), .sub(1'b0), .y(m_im));

  fp_add u_acc_re (.a(acc.re), .b(m_q.re), .sub(1'b0), .y(acc_next.re));
  fp_add u_acc_im (.a(acc.im), .b(m_q.im), .sub(1'b0), .y(acc_next.im));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      l1        <= 1'b0;
      l2        <= 1'b0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_pixel <= '0;
    end else begin
      v1        <= in_valid;
      l1        <= in_valid & in_last;
      v2        <= v1;
      l2        <= l1;
      out_valid <= 1'b0;
      if (v2) begin
        if (l2) begin
          acc       <= '0;
          out_valid <= 1'b1;
          out_pixel <= acc_next;
        end else begin
          acc <= acc_next;
        end
      end
    end
    q_cr <= p_cr;
    q_ci <= p_ci;
    q_sr <= p_sr;
    q_si <= p_si;
    m_q  <= '{im: m_im, re: m_re};
  end
endmodule
