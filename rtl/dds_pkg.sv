// dds_pkg: widths, types and the quarter-wave table formula shared by the
// sine synthesizer and the ASK/OOK modulators.
//
// The carrier is a direct digital synthesizer with an 8-bit phase (256
// samples per period). The two most significant phase bits name the quarter
// of the period, the lower six bits address a 64-entry table that holds only
// the first quarter of the sine. Samples are 16-bit signed.
//
// The table entry k (k = 0..63) is sample k of a 256-sample full period,
//     round(LUT_AMPLITUDE * sin(2*pi*k/256)),
// i.e. the first 64 samples of the full wave. The amplitude 10000 is the
// peak of the stored quarter wave; the widths 8, 6 and 16 follow the
// document. The rounding to nearest is this design's choice.
package dds_pkg;

  localparam int unsigned PHASE_W  = 8;   // phase accumulator width
  localparam int unsigned ADDR_W   = 6;   // quarter-wave table address width
  localparam int unsigned SAMPLE_W = 16;  // carrier and modulator sample width
  localparam int          LUT_AMPLITUDE = 10000;

  typedef logic        [PHASE_W-1:0]  phase_t;
  typedef logic        [ADDR_W-1:0]   lut_addr_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Quarter of the period selected by phase bits 7:6.
  typedef enum logic [1:0] {
    Q_FIRST  = 2'd0,  // samples   0..63  : +table[k]
    Q_SECOND = 2'd1,  // samples  64..127 : +table[63-k]
    Q_THIRD  = 2'd2,  // samples 128..191 : -table[k]
    Q_FOURTH = 2'd3   // samples 192..255 : -table[63-k]
  } quadrant_e;

  // Table entry k of a quarter-wave table with 2**addr_bits entries.
  function automatic int quarter_sine(input int k, input int amplitude, input int addr_bits);
    real pi, x;
    pi = 3.14159265358979323846;
    x  = $sin(2.0 * pi * real'(k) / real'(4 << addr_bits)) * real'(amplitude);
    return int'(x);   // real-to-int conversion rounds to nearest
  endfunction

endpackage
