// qam_normalize: scales the I and Q levels by the scheme's normalisation
// factor so that the average constellation power is one.
//
// Factors: BPSK and QPSK 1/sqrt(2), 16-QAM 1/sqrt(10), 64-QAM 1/sqrt(42),
// 256-QAM 1/sqrt(170); these follow the source (BPSK uses 1/sqrt(2) because
// the flexible BPSK points are +-1 + j). Factors are held in Q0.18; the
// product level * factor is rounded to the Q2.14 sample format
// (value = round(level * factor / 16)), within one LSB of the exact value. A scheme of zero bits gives 0.
// Combinational.
module qam_normalize
  import qam_pkg::*;
(
  input  logic [3:0]                mode,
  input  logic signed [LEVEL_W-1:0] level_i,
  input  logic signed [LEVEL_W-1:0] level_q,
  output sample_t                   out_i,
  output sample_t                   out_q
);
  localparam int PW = LEVEL_W + NORM_W + 1;

  logic [NORM_W-1:0] factor;

  always_comb begin
    unique case (mode)
      4'd1, 4'd2: factor = NORM_QPSK;
      4'd3, 4'd4: factor = NORM_16QAM;
      4'd5, 4'd6: factor = NORM_64QAM;
      4'd7, 4'd8: factor = NORM_256QAM;
      default:    factor = '0;
    endcase
  end

  function automatic sample_t scale(logic signed [LEVEL_W-1:0] lv,
                                    logic [NORM_W-1:0] f);
    logic signed [PW-1:0] p;
    p = PW'(lv) * $signed({1'b0, f});
    p = p + (PW'(1) <<< (NORM_W - SAMPLE_FRAC - 1));   // round half up
    return sample_t'(p >>> (NORM_W - SAMPLE_FRAC));
  endfunction

  assign out_i = scale(level_i, factor);
  assign out_q = scale(level_q, factor);
endmodule
