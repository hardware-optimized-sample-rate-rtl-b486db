// src_pkg: sizes, fixed-point formats and shared types of the sample rate
// converter (SRC).
//
// The defaults follow the published design: M = 8 polyphase filters of
// 19 taps with 16-bit coefficients, 70-bit time words, up to 8 complex
// channels (at most 4 per direction). The fixed-point formats are this
// design's own choices:
//   samples       16-bit signed Q1.15
//   coefficients  16-bit signed Q2.14 (so that the exact 1.0 of filter one fits)
//   times         70-bit unsigned, unit T3 = 2**FRAC_W LSB, T1 = M*T3
//   alpha         16-bit unsigned Q0.16 interpolation weight
package src_pkg;

  localparam int unsigned N_TAPS   = 19;
  localparam int unsigned M_PHASES = 8;
  localparam int unsigned COEF_W   = 16;
  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned TIME_W   = 70;
  localparam int unsigned FRAC_W   = 60;
  localparam int unsigned ALPHA_W  = 16;
  localparam int unsigned MAX_CH   = 8;
  localparam int unsigned CH_W     = $clog2(MAX_CH);
  // words reserved per channel in a context RAM (power of two >= N_TAPS)
  localparam int unsigned CTX_WORDS = 32;
  localparam int unsigned CTX_W     = $clog2(CTX_WORDS);

  // Fixed-point position of the coefficients: 1.0 == 2**COEF_FRAC.
  localparam int unsigned COEF_FRAC = 14;

  // Width of a FIR accumulator: full product plus log2 of the tap count.
  function automatic int unsigned acc_width(int unsigned sw, int unsigned cw, int unsigned taps);
    return sw + cw + $clog2(taps);
  endfunction

  // Direction of a channel: reception (A/D side to platform) or transmission.
  typedef enum logic {DIR_RX = 1'b0, DIR_TX = 1'b1} dir_e;

  // Context transfer operation between a shadow register set and a local RAM.
  typedef enum logic [1:0] {CTX_NONE = 2'd0, CTX_STORE = 2'd1, CTX_LOAD = 2'd2, CTX_ZERO = 2'd3} ctx_op_e;

endpackage
