// ifft_radix4_bfly: radix-4 decimation-in-frequency butterfly of the inverse
// transform, with a scale of 1/4.
//
// From the four inputs a0..a3 (one element of each sub-group) it forms
//   y0 = a0 +   a1 + a2 +   a3
//   y1 = a0 + j*a1 - a2 - j*a3
//   y2 = a0 -   a1 + a2 -   a3
//   y3 = a0 - j*a1 - a2 + j*a3
// (the inverse kernel, W_4^(-1) = +j) and divides each by 4 with rounding
// (add 2, arithmetic shift right by 2). Scaling by 1/4 in each of the log4(N)
// stages gives the 1/N of the inverse DFT overall and keeps the word width
// constant. Purely combinational.
//
// The radix-4 DIF inverse butterfly follows the source; placing the 1/N as
// 1/4 per stage is this design's choice.
module ifft_radix4_bfly
  import qam_pkg::*;
(
  input  cplx_t a [4],
  output cplx_t y [4]
);
  localparam int SW = SAMPLE_W + 2;
  typedef logic signed [SW-1:0] wide_t;

  function automatic sample_t quarter(wide_t s);
    wide_t r;
    r = s + wide_t'(2);
    return sample_t'(r >>> 2);
  endfunction

  wide_t ar [4], ai [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      ar[k] = wide_t'(a[k].re);
      ai[k] = wide_t'(a[k].im);
    end
    y[0].re = quarter(ar[0] + ar[1] + ar[2] + ar[3]);
    y[0].im = quarter(ai[0] + ai[1] + ai[2] + ai[3]);
    y[1].re = quarter(ar[0] - ai[1] - ar[2] + ai[3]);
    y[1].im = quarter(ai[0] + ar[1] - ai[2] - ar[3]);
    y[2].re = quarter(ar[0] - ar[1] + ar[2] - ar[3]);
    y[2].im = quarter(ai[0] - ai[1] + ai[2] - ai[3]);
    y[3].re = quarter(ar[0] + ai[1] - ar[2] - ai[3]);
    y[3].im = quarter(ai[0] - ar[1] - ai[2] + ar[3]);
  end
endmodule
