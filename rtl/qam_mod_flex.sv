// qam_mod_flex: flexible M-QAM modulator (BPSK, QPSK, 16-, 64- and 256-QAM)
// built around one shared amplitude LUT.
//
// Per subcarrier the scheme arrives on mod_valid / mod_ready as the number of
// bits per symbol (0, 1, 2, 4, 6 or 8). The modulator then takes that many
// data bits serially (bit_valid / bit_ready, first bit = b0), forms the I
// index from the even bits and the Q index from the odd bits by shift-and-add,
// reads both levels from the single LUT (Q negated), scales them by the
// scheme's normalisation factor and offers the symbol on sym_valid /
// sym_ready. A zero-bit scheme takes no bits and yields I = Q = 0.
//
// Timing: with a bit offered in every cycle, sym_valid rises n+1 clock edges
// after the edge that accepts the scheme (n edges take the bits, one
// registers the symbol) and holds until sym_ready; the next scheme can be
// accepted in the cycle after the symbol is taken.
//
// The chain s2p -> index calculation -> LUT -> normalisation follows the
// source. The handshakes and the output register are this design's choice.
module qam_mod_flex
  import qam_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // scheme of the next subcarrier
  input  logic  mod_valid,
  input  mod_t  mod_in,
  output logic  mod_ready,
  // serial data bits
  input  logic  bit_valid,
  input  logic  bit_in,
  output logic  bit_ready,
  // modulated symbol
  output logic  sym_valid,
  output cplx_t sym,
  input  logic  sym_ready
);
  typedef enum logic [1:0] {S_IDLE, S_COLLECT, S_OUT} state_t;

  state_t                    state;
  logic [3:0]                mode;
  logic [MAX_BITS-1:0]       word;
  logic                      full;
  logic                      s2p_start, s2p_consume;
  logic [3:0]                sym_i, sym_q;
  logic                      zero;
  logic signed [LEVEL_W-1:0] level_i, level_q;
  sample_t                   norm_i, norm_q;

  assign mod_ready   = (state == S_IDLE);
  assign s2p_start   = mod_valid && mod_ready;
  assign s2p_consume = (state == S_COLLECT) && full;
  assign sym_valid   = (state == S_OUT);

  qam_s2p #(.MAXB(MAX_BITS)) u_s2p (
    .clk, .rst_n,
    .start     (s2p_start),
    .nbits     (mod_in),
    .bit_valid,
    .bit_in,
    .bit_ready,
    .word,
    .full,
    .consume   (s2p_consume)
  );

  qam_symbol_calc u_calc (
    .nbits (mode),
    .bits  (word),
    .sym_i,
    .sym_q,
    .zero
  );

  qam_lut u_lut (
    .idx_i   (sym_i),
    .idx_q   (sym_q),
    .level_i,
    .level_q
  );

  qam_normalize u_norm (
    .mode,
    .level_i,
    .level_q,
    .out_i   (norm_i),
    .out_q   (norm_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mode  <= '0;
      sym   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (mod_valid) begin
          mode  <= mod_in;
          state <= S_COLLECT;
        end
        S_COLLECT: if (full) begin
          sym.re <= zero ? '0 : norm_i;
          sym.im <= zero ? '0 : norm_q;
          state  <= S_OUT;
        end
        S_OUT: if (sym_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  mod_code_a : assert property (@(posedge clk) disable iff (!rst_n)
    mod_valid |-> mod_is_valid(mod_in));
  sym_stable_a : assert property (@(posedge clk) disable iff (!rst_n)
    sym_valid && !sym_ready |=> sym_valid && $stable(sym));
endmodule
