// ifft_scalable: scalable radix-4 DIF IFFT for any size N = 4^v up to NMAX.
//
// The transform size is the only configuration input. One "IFFT stage"
// datapath (one radix-4 butterfly, one twiddle LUT, one complex multiplier)
// is reused for every stage of every size, driven by the stage / group /
// element loop of ifft_addr_gen; the samples stay in place in ifft_buffer
// between stages.
//
// Operation, one transform at a time:
//   1. start (with n_size = 4, 16, 64, 256, ...) while idle.
//   2. LOAD: N input samples X(0..N-1) are taken in natural order on
//      in_valid / in_ready.
//   3. COMPUTE: for each butterfly, four cycles read one element of each
//      sub-group into registers; then four cycles each pass one butterfly
//      output y_k through the multiplier with its twiddle factor and write
//      it back in place. 8 cycles per butterfly, (N/4)*log4(N) butterflies.
//   4. OUTPUT: N cycles with out_valid high give x(0..N-1) in natural order
//      (memory read at the base-4 digit-reversed address), out_last on the
//      final one. The output does not wait for a ready.
// Timing: counting the cycle in which start is taken as the first, out_last
// is high in cycle N + 2*N*log4(N) + N (64 points: 512, 256 points: 2560)
// when an input sample is offered in every load cycle.
// Result x(n) = (1/N) * sum_k X(k) * exp(+j*2*pi*k*n/N), in Q2.14.
//
// The algorithm, the single butterfly and multiplier, the shared twiddle
// table and the output scrambling follow the source. The memory-based
// schedule, the cycle counts, the handshakes and the 1/4 scaling per stage
// are this design's choice.
module ifft_scalable
  import qam_pkg::*;
#(
  parameter int NMAX = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [$clog2(NMAX):0]   n_size,
  output logic                    idle,
  input  logic                    in_valid,
  input  cplx_t                   in_data,
  output logic                    in_ready,
  output logic                    out_valid,
  output cplx_t                   out_data,
  output logic                    out_last
);
  localparam int AW   = $clog2(NMAX);
  localparam int VMAX = AW / 2;
  localparam int SW   = VMAX + 1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMPUTE, S_OUTPUT} state_t;

  state_t          state;
  logic [SW-1:0]   v;
  logic [AW:0]     n_pts;
  logic [AW:0]     cnt;
  logic [2:0]      phase;
  cplx_t           a_q [4];
  cplx_t           y   [4];

  // memory ports
  logic            mem_we;
  logic [AW-1:0]   mem_waddr, mem_raddr;
  cplx_t           mem_wdata, mem_rdata;

  // address generator
  logic            ag_start, ag_next, ag_active, ag_done;
  logic [SW-1:0]   ag_stage;
  logic [AW-1:0]   ag_addr [4];
  logic [AW-1:0]   ag_tw   [4];

  logic [AW-1:0]   rev_idx;
  logic signed [TW_W-1:0] tw_re, tw_im;
  cplx_t           prod;
  logic [1:0]      sel;

  // log4 of a power-of-4 size
  function automatic logic [SW-1:0] log4_of(logic [AW:0] n);
    logic [SW-1:0] r;
    r = '0;
    for (int k = 1; k <= VMAX; k++)
      if (n[2*k]) r = SW'(k);
    return r;
  endfunction

  assign idle     = (state == S_IDLE);
  assign in_ready = (state == S_LOAD);
  assign sel      = phase[1:0];

  ifft_addr_gen #(.NMAX(NMAX)) u_ag (
    .clk, .rst_n,
    .start  (ag_start),
    .log4n  (v),
    .next   (ag_next),
    .active (ag_active),
    .done   (ag_done),
    .stage  (ag_stage),
    .addr   (ag_addr),
    .tw_idx (ag_tw)
  );

  ifft_buffer #(.NMAX(NMAX)) u_mem (
    .clk,
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .raddr (mem_raddr),
    .rdata (mem_rdata)
  );

  ifft_radix4_bfly u_bfly (.a(a_q), .y(y));

  ifft_twiddle_rom #(.NMAX(NMAX)) u_tw (
    .idx   (ag_tw[sel]),
    .tw_re,
    .tw_im
  );

  cmul u_cmul (.a(y[sel]), .w_re(tw_re), .w_im(tw_im), .p(prod));

  ifft_digit_rev #(.NMAX(NMAX)) u_rev (
    .idx   (cnt[AW-1:0]),
    .log4n (v),
    .rev   (rev_idx)
  );

  wire load_last = in_valid && (cnt == n_pts - 1'b1);

  assign ag_start = (state == S_LOAD) && load_last;
  assign ag_next  = (state == S_COMPUTE) && ag_active && (phase == 3'd7);

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = cnt[AW-1:0];
    mem_wdata = in_data;
    mem_raddr = rev_idx;
    unique case (state)
      S_LOAD: mem_we = in_valid;
      S_COMPUTE: begin
        mem_raddr = ag_addr[sel];
        if (phase[2]) begin
          mem_we    = ag_active;
          mem_waddr = ag_addr[sel];
          mem_wdata = prod;
        end
      end
      default: ;
    endcase
  end

  assign out_valid = (state == S_OUTPUT);
  assign out_data  = mem_rdata;
  assign out_last  = out_valid && (cnt == n_pts - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      v     <= '0;
      n_pts <= '0;
      cnt   <= '0;
      phase <= '0;
      for (int k = 0; k < 4; k++) a_q[k] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          v     <= log4_of(n_size);
          n_pts <= n_size;
          cnt   <= '0;
          state <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          if (load_last) begin
            cnt   <= '0;
            phase <= '0;
            state <= S_COMPUTE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_COMPUTE: begin
          if (!phase[2]) a_q[sel] <= mem_rdata;
          phase <= phase + 1'b1;
          if (ag_done) state <= S_OUTPUT;
        end
        S_OUTPUT: begin
          if (out_last) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  stage_range_a : assert property (@(posedge clk) disable iff (!rst_n)
    ag_active |-> ag_stage < v);

  size_pow4_a : assert property (@(posedge clk) disable iff (!rst_n)
    start && idle |-> n_size >= 4 && n_size <= (AW+1)'(NMAX)
                      && $onehot(n_size) && (log4_of(n_size) != 0));
endmodule
