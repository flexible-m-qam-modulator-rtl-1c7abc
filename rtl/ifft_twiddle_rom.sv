// ifft_twiddle_rom: the one twiddle-factor table of the scalable IFFT.
//
// Holds W_NMAX^(-k) = cos(2*pi*k/NMAX) + j*sin(2*pi*k/NMAX) for k = 0..NMAX-1
// in Q2.14 (1.0 = 16384), rounded to nearest. Because the twiddle factors of
// every smaller power-of-4 size are a subset of those of the largest size,
// an N-point transform reads entry k*(NMAX/N) for its factor W_N^(-k), so one
// table serves every size. The table is computed at elaboration from
// $cos/$sin; reads are combinational.
//
// One table for the largest size, shared by all sizes, follows the source;
// the word format and the full-circle layout are this design's choice.
module ifft_twiddle_rom
  import qam_pkg::*;
#(
  parameter int NMAX = 256
) (
  input  logic [$clog2(NMAX)-1:0] idx,
  output logic signed [TW_W-1:0]  tw_re,
  output logic signed [TW_W-1:0]  tw_im
);
  typedef logic signed [TW_W-1:0] tw_tab_t [NMAX];

  localparam real PI = 3.14159265358979323846;

  function automatic tw_tab_t make_tab(bit want_sin);
    tw_tab_t t;
    real     a, v;
    for (int k = 0; k < NMAX; k++) begin
      a = 2.0 * PI * real'(k) / real'(NMAX);
      v = want_sin ? $sin(a) : $cos(a);
      t[k] = TW_W'($rtoi(v * real'(1 << SAMPLE_FRAC) + (v < 0.0 ? -0.5 : 0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t COS_TAB = make_tab(1'b0);
  localparam tw_tab_t SIN_TAB = make_tab(1'b1);

  assign tw_re = COS_TAB[idx];
  assign tw_im = SIN_TAB[idx];
endmodule
