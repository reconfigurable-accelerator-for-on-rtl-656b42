// axis_sar1_datapath: BackProjection accelerator with AXI4-Stream ports.
//
// A host computes, for one image pixel, the range R to the radar platform at
// each of N_PULSES pulses and the interpolated echo sample at that range. The
// accelerator turns them into the pixel value
//     f = sum_p sample[p] * (cos(2*ku*R[p]) + i*sin(2*ku*R[p]))
// It works in two phases per pixel, as the published accelerator does:
//   1. RANGE:  N_PULSES binary64 range values arrive on strm_in. Each passes
//              through the angle unit (sar_angle, 3 cycles) and the CORDIC
//              (sar_sincos, 24 cycles); sin and cos land in the local memories
//              (sar_trig_mem) at the pulse index.
//   2. SAMPLE: N_PULSES complex binary32 samples arrive on strm_in
//              (real part in bits [31:0], imaginary part in [63:32]). Each
//              reads its pulse's sin/cos, and sar_mf_acc multiplies and
//              accumulates.
// Between them the controller waits (DRAIN) until the last sin/cos has been
// written. After the last sample it waits for the sum (WAIT) and offers it on
// strm_out (OUT), complex binary32 in the same packing. strm_out_tlast is
// raised on every NPIX_X-th pixel, closing one image row, the unit the host's
// DMA receives at a time.
// Framing by counting, the two-phase controller with its drain and output
// states, the beat packing and the row TLAST are this design's choices; the
// input stream carries no TLAST. strm_in is accepted in RANGE and SAMPLE
// (tready = 1 there) and refused otherwise; strm_out follows the AXI4-Stream
// rule that data stays stable while tvalid is high and tready low.
// Timing: one input beat per cycle. Without stalls a pixel takes
// 2*N_PULSES+33 cycles: the input beats, 28 cycles from the last range to
// the first sample, 4 more from the last sample until the pixel is offered,
// and the output cycle.
// Reset: ap_rst_n, synchronous, active low.
module axis_sar1_datapath
  import sar_pkg::*;
#(
  parameter int unsigned N_PULSES = N_PULSES_DEF,
  parameter int unsigned NPIX_X   = NPIX_X_DEF,
  parameter f64_t        TWO_KU   = TWO_KU_DEF
) (
  input  logic        ap_clk,
  input  logic        ap_rst_n,
  // strm_in: range values, then samples
  input  logic [63:0] strm_in_tdata,
  input  logic        strm_in_tvalid,
  output logic        strm_in_tready,
  // strm_out: pixel values
  output logic [63:0] strm_out_tdata,
  output logic        strm_out_tvalid,
  input  logic        strm_out_tready,
  output logic        strm_out_tlast
);
  localparam int unsigned AW = (N_PULSES > 1) ? $clog2(N_PULSES) : 1;
  localparam int unsigned XW = (NPIX_X > 1) ? $clog2(NPIX_X) : 1;

  sar_state_t state;

  logic [AW-1:0] in_cnt;     // pulse index of the next input beat
  logic [AW:0]   wr_cnt;     // sin/cos words written in this pixel
  logic [XW-1:0] pix_cnt;    // pixel position within the row
  logic          in_fire, last_beat;

  assign strm_in_tready = (state == S_RANGE) || (state == S_SAMPLE);
  assign in_fire        = strm_in_tvalid && strm_in_tready;
  assign last_beat      = (in_cnt == AW'(N_PULSES - 1));

  // ---------------------------------------------------------------- phase 1
  logic          ang_valid;
  logic [31:0]   ang_phase;
  logic [AW-1:0] ang_tag;
  logic          sc_valid;
  f32_t          sc_sin, sc_cos;
  logic [AW-1:0] sc_tag;

  sar_angle #(.TWO_KU(TWO_KU), .PW(32), .TAG_W(AW)) u_angle (
    .clk      (ap_clk),
    .rst_n    (ap_rst_n),
    .in_valid (in_fire && state == S_RANGE),
    .in_r     (strm_in_tdata),
    .in_tag   (in_cnt),
    .out_valid(ang_valid),
    .out_phase(ang_phase),
    .out_tag  (ang_tag)
  );

  sar_sincos #(.ITER(CORDIC_ITER), .TAG_W(AW)) u_sincos (
    .clk      (ap_clk),
    .rst_n    (ap_rst_n),
    .in_valid (ang_valid),
    .in_phase (ang_phase),
    .in_tag   (ang_tag),
    .out_valid(sc_valid),
    .out_sin  (sc_sin),
    .out_cos  (sc_cos),
    .out_tag  (sc_tag)
  );

  // ---------------------------------------------------------------- memory
  logic  smp_rd;
  f32_t  mem_sin, mem_cos;

  assign smp_rd = in_fire && state == S_SAMPLE;

  sar_trig_mem #(.DEPTH(N_PULSES), .AW(AW)) u_mem (
    .clk  (ap_clk),
    .we   (sc_valid),
    .waddr(sc_tag),
    .wsin (sc_sin),
    .wcos (sc_cos),
    .re   (smp_rd),
    .raddr(in_cnt),
    .rsin (mem_sin),
    .rcos (mem_cos)
  );

  // ---------------------------------------------------------------- phase 2
  // The sample waits one cycle for its sin/cos to come out of the memory.
  logic  smp_valid, smp_last;
  cplx_t smp_data;
  logic  mf_valid;
  cplx_t mf_pixel;

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      smp_valid <= 1'b0;
      smp_last  <= 1'b0;
    end else begin
      smp_valid <= smp_rd;
      smp_last  <= smp_rd && last_beat;
    end
    smp_data <= strm_in_tdata;
  end

  sar_mf_acc u_mf_acc (
    .clk      (ap_clk),
    .rst_n    (ap_rst_n),
    .in_valid (smp_valid),
    .in_last  (smp_last),
    .in_cos   (mem_cos),
    .in_sin   (mem_sin),
    .in_sample(smp_data),
    .out_valid(mf_valid),
    .out_pixel(mf_pixel)
  );

  // ---------------------------------------------------------------- control
  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state           <= S_RANGE;
      in_cnt          <= '0;
      wr_cnt          <= '0;
      pix_cnt         <= '0;
      strm_out_tvalid <= 1'b0;
      strm_out_tdata  <= '0;
      strm_out_tlast  <= 1'b0;
    end else begin
      if (sc_valid) wr_cnt <= wr_cnt + 1'b1;
      if (in_fire)  in_cnt <= last_beat ? '0 : in_cnt + 1'b1;
      unique case (state)
        S_RANGE:  if (in_fire && last_beat) state <= S_DRAIN;
        S_DRAIN:  if (wr_cnt == (AW+1)'(N_PULSES)) begin
                    state  <= S_SAMPLE;
                    wr_cnt <= '0;
                  end
        S_SAMPLE: if (in_fire && last_beat) state <= S_WAIT;
        S_WAIT:   if (mf_valid) begin
                    state           <= S_OUT;
                    strm_out_tvalid <= 1'b1;
                    strm_out_tdata  <= mf_pixel;
                    strm_out_tlast  <= (pix_cnt == XW'(NPIX_X - 1));
                  end
        S_OUT:    if (strm_out_tready) begin
                    state           <= S_RANGE;
                    strm_out_tvalid <= 1'b0;
                    strm_out_tlast  <= 1'b0;
                    pix_cnt         <= (pix_cnt == XW'(NPIX_X - 1)) ? '0 : pix_cnt + 1'b1;
                  end
        default:  state <= S_RANGE;
      endcase
    end
  end

  // AXI4-Stream: output data must hold while it waits for tready.
  property p_out_stable;
    @(posedge ap_clk) disable iff (!ap_rst_n)
      (strm_out_tvalid && !strm_out_tready) |=> (strm_out_tvalid && $stable(strm_out_tdata)
                                                 && $stable(strm_out_tlast));
  endproperty
  a_out_stable: assert property (p_out_stable);

  // No sin/cos may be written outside phase 1 and its drain.
  a_no_late_write: assert property (@(posedge ap_clk) disable iff (!ap_rst_n)
                                    sc_valid |-> (state == S_RANGE || state == S_DRAIN));
endmodule
