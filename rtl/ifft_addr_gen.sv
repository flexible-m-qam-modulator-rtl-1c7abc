// ifft_addr_gen: the stage / group / element loop of the scalable IFFT
// ("mapping onto groups and sub-groups").
//
// For an N = 4^v point transform (v = log4n) it walks
//   for n_stage = 0 .. v-1                      (N_stage = log4 N)
//     N_group   = 4^n_stage
//     N_element = N / (4 * N_group)             (elements per sub-group)
//     for n_group = 0 .. N_group-1
//       for n_element = 0 .. N_element-1
// and for each step presents the butterfly's four memory addresses, one
// element from each of the four sub-groups of the group,
//   addr[k] = n_group * 4*N_element + k*N_element + n_element,   k = 0..3,
// and the index into the NMAX-entry twiddle table for each output k,
//   tw_idx[k] = (k * n_element * N_group) * (NMAX / N),
// i.e. W_N^(-k*n_element*N_group): W^(0n,1n,2n,3n) in the first stage,
// W^(0n,4n,8n,12n) in the second, and so on.
// tw_idx[0] is always 0 (the first output's factor is 1); it is kept so that
// the four outputs are indexed alike.
//
// Interface: a `start` pulse (with log4n, 1..log4(NMAX)) begins the walk;
// `active` is high while a butterfly is presented; `next` moves to the next
// one. `done` pulses in the cycle of the `next` that retires the last
// butterfly. `stage` gives n_stage.
//
// The loop nest and the formulas for N_group and N_element follow the
// source; counting the loops from 0 and the handshake are this design's.
module ifft_addr_gen #(
  parameter int NMAX = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [$clog2(NMAX)/2:0]       log4n,
  input  logic                          next,
  output logic                          active,
  output logic                          done,
  output logic [$clog2(NMAX)/2:0]       stage,
  output logic [$clog2(NMAX)-1:0]       addr   [4],
  output logic [$clog2(NMAX)-1:0]       tw_idx [4]
);
  localparam int AW   = $clog2(NMAX);
  localparam int VMAX = AW / 2;
  localparam int SW   = VMAX + 1;

  logic [SW-1:0] v, n_stage;
  logic [AW-1:0] n_group, n_element;
  logic [AW:0]   n_grp_cnt, n_elem_cnt;   // N_group, N_element
  logic [AW-1:0] span;                    // 4 * N_element
  logic [AW-1:0] tw_base;
  logic          last_elem, last_group, last_stage;

  // N_group = 4^n_stage, N_element = 4^(v - n_stage - 1)
  assign n_grp_cnt  = (AW+1)'(1) << (2 * n_stage);
  assign n_elem_cnt = (AW+1)'(1) << (2 * (v - n_stage - 1'b1));
  assign span       = AW'(n_elem_cnt << 2);

  assign last_elem  = ((AW+1)'(n_element) == n_elem_cnt - 1'b1);
  assign last_group = ((AW+1)'(n_group)   == n_grp_cnt  - 1'b1);
  assign last_stage = (n_stage == v - 1'b1);

  assign stage = n_stage;
  assign done  = active && next && last_elem && last_group && last_stage;

  // n_element * N_group, in units of the NMAX-point table
  assign tw_base = AW'((n_element << (2 * n_stage)) << (2 * (SW'(VMAX) - v)));

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      addr[k]   = AW'(n_group * span) + AW'(k * n_elem_cnt) + n_element;
      tw_idx[k] = AW'(k * tw_base);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      v         <= '0;
      n_stage   <= '0;
      n_group   <= '0;
      n_element <= '0;
    end else if (start) begin
      active    <= 1'b1;
      v         <= log4n;
      n_stage   <= '0;
      n_group   <= '0;
      n_element <= '0;
    end else if (active && next) begin
      if (!last_elem) begin
        n_element <= n_element + 1'b1;
      end else begin
        n_element <= '0;
        if (!last_group) begin
          n_group <= n_group + 1'b1;
        end else begin
          n_group <= '0;
          if (!last_stage) n_stage <= n_stage + 1'b1;
          else             active  <= 1'b0;
        end
      end
    end
  end

  log4n_range_a : assert property (@(posedge clk) disable iff (!rst_n)
    start |-> log4n >= 1 && log4n <= SW'(VMAX));
endmodule
