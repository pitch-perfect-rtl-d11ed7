// pv_pkg: constants and small arithmetic helpers shared by the phase-vocoder
// pipeline.
//
// Number formats used throughout the datapath:
//   * audio samples      : 16-bit signed integers (codec words).
//   * buffer words       : 16-bit signed fixed point with 8 fractional bits
//                          (Q8.8). Magnitudes, phases, bin deviations and the
//                          FFT data all use this format.
//   * phases             : Q8.8 radians, wrapped to [-pi, pi). pi is 804
//                          (0x324), 2*pi is 1608 and pi/2 is 402.
//   * Hann coefficients  : 16-bit unsigned, all 16 bits fractional (Q0.16).
//   * pitch scale amount : 8-bit unsigned with 6 fractional bits (Q2.6), so
//                          64 means "no change".
// The window length (4096), hop (1024) and ring length (4096 + 1024) follow the
// design; the Q8.8 phase constants and the 2/pi bin-deviation factor (163/256)
// are the design's own fixed-point values.
package pv_pkg;

  localparam int unsigned WIN_LEN  = 4096;
  localparam int unsigned HOP_LEN  = 1024;
  localparam int unsigned RING_LEN = WIN_LEN + HOP_LEN;

  typedef logic signed [15:0] q88_t;

  localparam q88_t PHASE_PI      = 16'sd804;
  localparam q88_t PHASE_TWO_PI  = 16'sd1608;
  localparam q88_t PHASE_HALF_PI = 16'sd402;
  // 2/pi in Q0.8, converts a phase error (radians) into a bin deviation
  // (bins) for a hop of a quarter window: 4096 / (2*pi*1024) = 2/pi.
  localparam int   BIN_DEV_MULT  = 163;

  // Wraps a phase (Q8.8 radians, any value within +/- 9*pi) to [-pi, pi)
  // using a bounded number of conditional corrections instead of a modulo.
  function automatic q88_t wrap_phase(input logic signed [23:0] p);
    logic signed [23:0] v;
    v = p;
    for (int k = 0; k < 4; k++) begin
      if (v >= 24'(PHASE_PI))       v = v - 24'(PHASE_TWO_PI);
      else if (v < -24'(PHASE_PI))  v = v + 24'(PHASE_TWO_PI);
    end
    for (int k = 0; k < 4; k++) begin
      if (v >= 24'(PHASE_PI))       v = v - 24'(PHASE_TWO_PI);
      else if (v < -24'(PHASE_PI))  v = v + 24'(PHASE_TWO_PI);
    end
    return q88_t'(v);
  endfunction

  // Saturates a wide signed value to 16 bits.
  function automatic q88_t sat16(input logic signed [31:0] v);
    if (v > 32'sd32767)       return 16'sd32767;
    else if (v < -32'sd32768) return -16'sd32768;
    else                      return q88_t'(v);
  endfunction

endpackage
