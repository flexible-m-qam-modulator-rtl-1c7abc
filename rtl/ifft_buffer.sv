// ifft_buffer: sample memory of the scalable IFFT.
//
// NMAX complex samples kept as two separate arrays, one for the real parts
// and one for the imaginary parts, with one write port (written at the clock
// edge when we is high) and one combinational read port. The IFFT uses it in
// place: streaming input, every butterfly of every stage, and the scrambled
// read-out all go through these two ports. Contents are not reset; the IFFT
// writes every location it later reads.
//
// Separate real and imaginary storage follows the source; the port count
// and the asynchronous read are this design's choice.
module ifft_buffer
  import qam_pkg::*;
#(
  parameter int NMAX = 256
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(NMAX)-1:0] waddr,
  input  cplx_t                   wdata,
  input  logic [$clog2(NMAX)-1:0] raddr,
  output cplx_t                   rdata
);
  sample_t mem_re [NMAX];
  sample_t mem_im [NMAX];

  always_ff @(posedge clk) begin
    if (we) begin
      mem_re[waddr] <= wdata.re;
      mem_im[waddr] <= wdata.im;
    end
  end

  assign rdata.re = mem_re[raddr];
  assign rdata.im = mem_im[raddr];
endmodule
