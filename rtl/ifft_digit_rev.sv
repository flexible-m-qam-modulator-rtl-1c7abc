// ifft_digit_rev: output scrambling of the scalable IFFT.
//
// An in-place radix-4 DIF transform leaves its results in base-4
// digit-reversed order. This block reverses the order of the lowest `log4n`
// base-4 digits (2-bit fields) of `idx`; the IFFT reads its memory at
// rev(n) to deliver output n in natural order. Bits above the 2*log4n used
// digits give 0. Combinational.
//
// The scrambling step for the last stage follows the source; doing it as an
// address permutation on read-out is this design's choice.
module ifft_digit_rev #(
  parameter int NMAX = 256
) (
  input  logic [$clog2(NMAX)-1:0]       idx,
  input  logic [$clog2(NMAX)/2:0]       log4n,
  output logic [$clog2(NMAX)-1:0]       rev
);
  localparam int AW   = $clog2(NMAX);
  localparam int VMAX = AW / 2;

  always_comb begin
    rev = '0;
    for (int d = 0; d < VMAX; d++) begin
      for (int r = 0; r < VMAX; r++) begin
        if (d < int'(log4n) && r == int'(log4n) - 1 - d)
          rev[2*r +: 2] = idx[2*d +: 2];
      end
    end
  end
endmodule
