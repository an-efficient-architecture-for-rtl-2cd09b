// Shared types and constants of the channel-access pass-through.
//
// The pass-through moves 14-bit I/Q samples between two ADC/DAC daughter
// boards and can inject noise into them by non-uniform sampling: a shift
// register holds the last few samples and a pseudo-random (PN) number picks
// which of them is sent on. This package holds the sample types, the
// run-time selections of the noise injector, and the feedback taps of the PN
// generators of order 3 to 10 (the primitive polynomials x^3+x+1 ... x^10+x^3+1).
//
// The 14-bit width, the polynomials and the register counts follow the
// document; the enum encodings and the treatment of samples as two's
// complement are this design's own choices.
package access_pkg;

  localparam int SAMPLE_W = 14;  // ADC / DAC word
  localparam int WIDE_W   = 32;  // interpolated word inside the injector
  localparam int COEF_FRAC = 12; // fraction bits of the interpolation filter

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [WIDE_W-1:0]   wide_t;

  // Which noise-injection experiment drives a lane when injection is on.
  typedef enum logic [1:0] {
    MODE_BYPASS  = 2'd0,  // samples pass unchanged
    MODE_BUFF6   = 2'd1,  // 6-register sampler on the raw ADC stream
    MODE_MULTIPN = 2'd2,  // x4 interpolation, 3 registers, PN order selectable
    MODE_UNIFORM = 2'd3   // x4 interpolation, 3/5/13/25 registers, 9-bit PN
  } mode_e;

  // Register-choice distribution of the 6-register sampler.
  typedef enum logic [1:0] {
    DIST_NORMAL = 2'd0,  // centre register c most often, ends least often
    DIST_TIGHT  = 2'd1,  // modified normal: c even more often
    DIST_EVEN   = 2'd2,  // nearly even over din, a..f
    DIST_SINGLE = 2'd3   // always c: uniform sampling, three samples late
  } dist6_e;

  // Length of the uniform sampler's window.
  typedef enum logic [1:0] {
    REGS_3  = 2'd0,
    REGS_5  = 2'd1,
    REGS_13 = 2'd2,
    REGS_25 = 2'd3
  } nregs_e;

  localparam int PN_MIN_ORDER = 3;
  localparam int PN_MAX_ORDER = 10;

  // Feedback taps of the PN generator of the given order. Bit i-1 set means
  // stage i (stage 1 is the input stage, stage ORDER the output) feeds the
  // XOR whose result enters stage 1. For P(x) = x^n + sum x^k + 1 the taps
  // are stage n and stages n-k.
  function automatic logic [PN_MAX_ORDER-1:0] pn_taps(input int order);
    logic [PN_MAX_ORDER-1:0] t;
    t = '0;
    case (order)
      3:  begin t[2] = 1'b1; t[1] = 1'b1; end                       // x^3+x+1
      4:  begin t[3] = 1'b1; t[2] = 1'b1; end                       // x^4+x+1
      5:  begin t[4] = 1'b1; t[2] = 1'b1; end                       // x^5+x^2+1
      6:  begin t[5] = 1'b1; t[4] = 1'b1; end                       // x^6+x+1
      7:  begin t[6] = 1'b1; t[5] = 1'b1; end                       // x^7+x+1
      8:  begin t[7] = 1'b1; t[5] = 1'b1; t[4] = 1'b1; t[3] = 1'b1; end // x^8+x^4+x^3+x^2+1
      9:  begin t[8] = 1'b1; t[4] = 1'b1; end                       // x^9+x^4+1
      10: begin t[9] = 1'b1; t[6] = 1'b1; end                       // x^10+x^3+1
      default: t = '0;
    endcase
    return t;
  endfunction

endpackage
