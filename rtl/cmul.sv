// cmul: the twiddle-factor complex multiplier of the IFFT.
//
// Computes a * w for a sample a and a twiddle factor w in Q2.14:
//   re = ar*wr - ai*wi,  im = ar*wi + ai*wr,
// each rounded (add half an LSB, shift right by 14) and saturated to the
// sample width. Four real multipliers, purely combinational.
//
// A single multiplier for all twiddle products follows the source; rounding
// and saturation are this design's choice.
module cmul
  import qam_pkg::*;
(
  input  cplx_t                  a,
  input  logic signed [TW_W-1:0] w_re,
  input  logic signed [TW_W-1:0] w_im,
  output cplx_t                  p
);
  localparam int PW = SAMPLE_W + TW_W + 1;
  typedef logic signed [PW-1:0] prod_t;

  localparam prod_t HALF = prod_t'(1) <<< (SAMPLE_FRAC - 1);
  localparam prod_t MAXV = prod_t'((1 << (SAMPLE_W - 1)) - 1);
  localparam prod_t MINV = -prod_t'(1 << (SAMPLE_W - 1));

  function automatic sample_t round_sat(prod_t x);
    prod_t r;
    r = (x + HALF) >>> SAMPLE_FRAC;
    if (r > MAXV)      return sample_t'(MAXV);
    else if (r < MINV) return sample_t'(MINV);
    else               return sample_t'(r);
  endfunction

  prod_t pr, pi;

  always_comb begin
    pr   = prod_t'(a.re) * prod_t'(w_re) - prod_t'(a.im) * prod_t'(w_im);
    pi   = prod_t'(a.re) * prod_t'(w_im) + prod_t'(a.im) * prod_t'(w_re);
    p.re = round_sat(pr);
    p.im = round_sat(pi);
  end
endmodule
