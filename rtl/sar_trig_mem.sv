// sar_trig_mem: the accelerator's local sine and cosine memories.
//
// The first loop of the accelerator stores sin and cos of every pulse's angle
// at the pulse index; the second loop reads them back in the same order while
// the pulse samples stream in. Two arrays of DEPTH binary32 words (mem_sin,
// mem_cos, one 18-kbit block RAM each at 512 x 32) share one write port and
// one read port.
// Timing: a write (we, waddr, wsin, wcos) lands at the clock edge; a read
// (re, raddr) returns rsin/rcos one cycle later, held until the next read.
// Writing and reading the same address in one cycle returns the old word.
module sar_trig_mem
  import sar_pkg::*;
#(
  parameter int unsigned DEPTH = N_PULSES_DEF,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  f32_t          wsin,
  input  f32_t          wcos,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output f32_t          rsin,
  output f32_t          rcos
);
  f32_t mem_sin [DEPTH];
  f32_t mem_cos [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem_sin[waddr] <= wsin;
      mem_cos[waddr] <= wcos;
    end
  end

  always_ff @(posedge clk) begin
    if (re) begin
      rsin <= mem_sin[raddr];
      rcos <= mem_cos[raddr];
    end
  end
endmodule
