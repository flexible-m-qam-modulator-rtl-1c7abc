// qam_symbol_calc: LUT index calculation of the flexible M-QAM modulator.
//
// The I index is built from the even bits of the symbol word and the Q index
// from the odd bits, each by shift-and-add in the order of the decision chain
// of the flexible modulator:
//   BPSK   (1 bit) : I = b0,                       Q = 0
//   QPSK   (2 bits): I = b0,                       Q = b1
//   16-QAM (4 bits): I += b2<<1,                   Q += b3<<1
//   64-QAM (6 bits): I += b4<<2,                   Q += b5<<2
//   256-QAM(8 bits): I += b6<<3,                   Q += b7<<3
// With no bits the subcarrier is off and `zero` is raised so that the
// modulator sends I = Q = 0. Purely combinational.
//
// All of the above follows the source. An unlisted bit count (3, 5, 7) simply
// runs through the same chain, i.e. it acts as the next larger scheme with its
// top odd bit at 0; the modulator never asks for one.
module qam_symbol_calc
  import qam_pkg::*;
(
  input  logic [3:0]          nbits,
  input  logic [MAX_BITS-1:0] bits,
  output logic [3:0]          sym_i,
  output logic [3:0]          sym_q,
  output logic                zero
);
  always_comb begin
    sym_i = '0;
    sym_q = '0;
    zero  = (nbits == 4'd0);
    if (nbits > 4'd0) begin
      sym_i = {3'b000, bits[0]};
      sym_q = '0;
    end
    if (nbits > 4'd1) begin
      sym_q = {3'b000, bits[1]};
    end
    if (nbits > 4'd2) begin
      sym_i = sym_i + {2'b00, bits[2], 1'b0};
      sym_q = sym_q + {2'b00, bits[3], 1'b0};
    end
    if (nbits > 4'd4) begin
      sym_i = sym_i + {1'b0, bits[4], 2'b00};
      sym_q = sym_q + {1'b0, bits[5], 2'b00};
    end
    if (nbits > 4'd6) begin
      sym_i = sym_i + {bits[6], 3'b000};
      sym_q = sym_q + {bits[7], 3'b000};
    end
  end
endmodule
