// qam_lut: the one look-up table shared by every modulation scheme.
//
// Sixteen signed amplitude levels indexed by the 4-bit symbol index. The
// lower-order constellations are subsets of the higher ones, so BPSK and QPSK
// use entries 0..1, 16-QAM entries 0..3, 64-QAM 0..7 and 256-QAM all 16. The
// I level is the table entry; the Q level is the same entry negated, so the
// single table serves both rails (it is read at two indices at once).
// Combinational.
//
// Table contents (Gray-coded levels, index -> level):
//   0:-1  1:1  2:-3  3:3  4:-7  5:7  6:-5  7:5
//   8:-11 9:11 10:-13 11:13 12:-9 13:9 14:-15 15:15
// These values and the negation for Q follow the source.
module qam_lut
  import qam_pkg::*;
(
  input  logic [3:0]                idx_i,
  input  logic [3:0]                idx_q,
  output logic signed [LEVEL_W-1:0] level_i,
  output logic signed [LEVEL_W-1:0] level_q
);
  typedef logic signed [LEVEL_W-1:0] level_t;

  localparam level_t LUT [16] = '{
    -5'sd1,  5'sd1,  -5'sd3,  5'sd3,  -5'sd7,  5'sd7,  -5'sd5,  5'sd5,
    -5'sd11, 5'sd11, -5'sd13, 5'sd13, -5'sd9,  5'sd9,  -5'sd15, 5'sd15
  };

  assign level_i = LUT[idx_i];
  assign level_q = -LUT[idx_q];
endmodule
