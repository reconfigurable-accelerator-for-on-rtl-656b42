// sar_pkg: types and constants shared by the BackProjection accelerator.
//
// The accelerator works on IEEE-754 numbers: range values arrive as binary64
// (double) words, pulse samples and the pixel result are complex binary32
// (single) pairs. A complex pair travels as one 64-bit word with the real part
// in bits [31:0] and the imaginary part in bits [63:32]; that packing is this
// design's choice. The numeric defaults (512 pulses per pixel, 512 pixels per
// image row, a 24-iteration CORDIC) follow the accelerator's published
// configuration; the carrier constant is a design choice (10 GHz carrier).
package sar_pkg;

  typedef logic [31:0] f32_t;   // IEEE-754 binary32 bit pattern
  typedef logic [63:0] f64_t;   // IEEE-754 binary64 bit pattern

  typedef struct packed {
    f32_t im;
    f32_t re;
  } cplx_t;

  // Pulses per pixel and pixels per image row.
  localparam int unsigned N_PULSES_DEF = 512;
  localparam int unsigned NPIX_X_DEF   = 512;

  // CORDIC iterations (one pipeline stage each) and phase width in bits.
  localparam int unsigned CORDIC_ITER = 24;
  localparam int unsigned PHASE_W     = 32;

  // Phases of the accelerator's per-pixel controller (axis_sar1_datapath).
  typedef enum logic [2:0] {
    S_RANGE,    // accepting range values
    S_DRAIN,    // waiting for the last sin/cos to reach the memory
    S_SAMPLE,   // accepting pulse samples
    S_WAIT,     // waiting for the accumulated pixel
    S_OUT       // offering the pixel on the output stream
  } sar_state_t;

  // 2*ku = 2 * (2*pi*fc/c) for fc = 10 GHz, c = 299792458 m/s, as binary64.
  localparam f64_t TWO_KU_DEF = 64'h407a32b43df29600;  // 419.169004390336 rad/m
  // 1/(2*pi) as binary64, turns the angle in radians into turns.
  localparam f64_t INV_2PI    = 64'h3fc45f306dc9c883;

endpackage
