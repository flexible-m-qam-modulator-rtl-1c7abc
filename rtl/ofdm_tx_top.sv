// ofdm_tx_top: baseband core of a multi-standard OFDM transmitter with link
// adaptation: per-subcarrier bit loading, the flexible M-QAM modulator and
// the scalable IFFT, for IEEE 802.11a (64 subcarriers) and 802.16d (256)
// with one set of hardware.
//
// Data flow for one OFDM symbol:
//   bit_loading_table --scheme of subcarrier k--> qam_mod_flex
//   serial data bits -------------------------> qam_mod_flex --X(k)--> ifft_scalable
//   ifft_scalable --x(n), natural order--> out_*
// The link adaptation, which decides the schemes, lies outside; it writes
// the table through la_wr_*. Subcarriers set to MOD_NONE carry zero.
//
// Interface: pulse `start` with n_size (64, 256, or any power of 4 up to
// NMAX) while `idle` is high. The core then takes exactly as many serial
// bits as the table asks for subcarriers 0..N-1 (bit_valid / bit_ready, b0
// of each symbol first), computes the IFFT and streams N time samples on
// out_valid / out_data with out_last on the final one. Bits are refused
// (bit_ready low) outside the modulation phase. The table may be rewritten
// between symbols, which switches schemes per subcarrier; n_size may change
// from symbol to symbol, which switches standard.
//
// Timing: modulation of subcarrier k takes 3 + n_k cycles when bits arrive
// every cycle; then the IFFT needs 2*N*log4(N) cycles and N output cycles.
//
// The chain and its parts follow the source; how they are sequenced and the
// handshakes are this design's choice.
module ofdm_tx_top
  import qam_pkg::*;
#(
  parameter int NMAX = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // link adaptation: scheme per subcarrier
  input  logic                    la_wr_en,
  input  logic [$clog2(NMAX)-1:0] la_wr_addr,
  input  mod_t                    la_wr_mod,
  // symbol control
  input  logic                    start,
  input  logic [$clog2(NMAX):0]   n_size,
  output logic                    idle,
  // serial data bits
  input  logic                    bit_valid,
  input  logic                    bit_in,
  output logic                    bit_ready,
  // time-domain samples
  output logic                    out_valid,
  output cplx_t                   out_data,
  output logic                    out_last
);
  localparam int AW = $clog2(NMAX);

  typedef enum logic [1:0] {T_IDLE, T_MOD, T_DRAIN} state_t;

  state_t        state;
  logic [AW:0]   n_pts;
  logic [AW:0]   sc;          // next subcarrier to hand to the modulator
  mod_t          sc_mod;
  logic          mod_valid, mod_ready;
  logic          mod_bit_ready;
  logic          sym_valid, sym_ready;
  cplx_t         sym;
  logic          fft_idle, fft_start;

  bit_loading_table #(.NMAX(NMAX)) u_table (
    .clk, .rst_n,
    .wr_en   (la_wr_en),
    .wr_addr (la_wr_addr),
    .wr_mod  (la_wr_mod),
    .rd_addr (sc[AW-1:0]),
    .rd_mod  (sc_mod)
  );

  assign mod_valid = (state == T_MOD) && (sc < n_pts);
  assign bit_ready = mod_bit_ready && (state == T_MOD);

  qam_mod_flex u_mod (
    .clk, .rst_n,
    .mod_valid,
    .mod_in    (sc_mod),
    .mod_ready,
    .bit_valid (bit_valid && state == T_MOD),
    .bit_in,
    .bit_ready (mod_bit_ready),
    .sym_valid,
    .sym,
    .sym_ready
  );

  assign fft_start = (state == T_IDLE) && start && fft_idle;
  assign idle      = (state == T_IDLE) && fft_idle;

  ifft_scalable #(.NMAX(NMAX)) u_ifft (
    .clk, .rst_n,
    .start     (fft_start),
    .n_size,
    .idle      (fft_idle),
    .in_valid  (sym_valid),
    .in_data   (sym),
    .in_ready  (sym_ready),
    .out_valid,
    .out_data,
    .out_last
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= T_IDLE;
      n_pts <= '0;
      sc    <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (fft_start) begin
          n_pts <= n_size;
          sc    <= '0;
          state <= T_MOD;
        end
        T_MOD: begin
          if (mod_valid && mod_ready) sc <= sc + 1'b1;
          // all schemes handed over and the last symbol taken by the IFFT
          if (sc == n_pts && mod_ready) state <= T_DRAIN;
        end
        T_DRAIN: if (out_last) state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
