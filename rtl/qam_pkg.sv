// qam_pkg: types and constants shared by the flexible M-QAM modulator, the
// scalable IFFT and the transmitter top.
//
// Sample format: every complex sample carries separate real and imaginary
// words of SAMPLE_W bits in two's complement with SAMPLE_FRAC fractional bits
// (Q2.14 for 16 bits). The range of +-2 holds the largest normalised QAM level
// (15/sqrt(170) = 1.15) with room for the IFFT's rotations. The width and the
// format are this design's choice; the source only says fixed point is used.
//
// The modulation scheme is encoded by its number of bits per symbol, which is
// how the flexible modulator's decision chain selects it ("No. of bits").
// Zero bits means the subcarrier is not modulated and carries I = Q = 0.
package qam_pkg;

  localparam int SAMPLE_W    = 16;
  localparam int SAMPLE_FRAC = 14;
  localparam int MAX_BITS    = 8;   // 256-QAM is the largest scheme
  localparam int LEVEL_W     = 5;   // signed LUT level, -15..+15
  localparam int NORM_W      = 18;  // unsigned normalisation factor, Q0.18
  localparam int TW_W        = 16;  // twiddle factor word, Q2.14

  typedef enum logic [3:0] {
    MOD_NONE   = 4'd0,
    MOD_BPSK   = 4'd1,
    MOD_QPSK   = 4'd2,
    MOD_16QAM  = 4'd4,
    MOD_64QAM  = 4'd6,
    MOD_256QAM = 4'd8
  } mod_t;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Normalisation factor 1/sqrt(k) in Q0.18, rounded. BPSK uses the QPSK
  // factor because its points are two QPSK points (+-1 + j).
  function automatic logic [NORM_W-1:0] norm_const(real k);
    return NORM_W'($rtoi(real'(1 << NORM_W) / $sqrt(k) + 0.5));
  endfunction

  localparam logic [NORM_W-1:0] NORM_QPSK   = norm_const(2.0);
  localparam logic [NORM_W-1:0] NORM_16QAM  = norm_const(10.0);
  localparam logic [NORM_W-1:0] NORM_64QAM  = norm_const(42.0);
  localparam logic [NORM_W-1:0] NORM_256QAM = norm_const(170.0);

  // True for the six scheme codes the modulator understands.
  function automatic logic mod_is_valid(logic [3:0] code);
    return code inside {4'd0, 4'd1, 4'd2, 4'd4, 4'd6, 4'd8};
  endfunction

endpackage
