// tb_ofdm_tx_top: end-to-end test of the transmitter at its default size
// (NMAX = 256, no parameter overrides).
//
// Five OFDM symbols are sent: 64 subcarriers (802.11a size), 256
// subcarriers (802.16d size), 64 again, 16, and 256 again, with the
// per-subcarrier schemes rewritten through the link-adaptation port before
// each symbol (all six codes from "off" to 256-QAM appear). A random bit
// source drives the serial input with gaps. The testbench records every bit
// the core accepts, maps it with its own model (even bits -> I, odd -> Q,
// 16-entry Gray level table, Q negated, 1/sqrt(k) scaling) and compares the
// core's output with a direct inverse DFT of those symbols in real
// arithmetic. It also checks that the core takes exactly sum(n_k) bits, that
// the N outputs come in one unbroken burst, and that the IFFT part takes
// 2*N*log4(N) + N cycles from the last symbol to out_last.
//
// Mechanisms counted, each must occur: every scheme code, a standard/size
// switch between symbols, a bit-source gap (bit_valid low while the core
// waits), a refused bit (bit_valid high while the core is computing), a
// table rewrite between symbols.
module tb_ofdm_tx_top;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic la_wr_en = 0;
  logic [7:0] la_wr_addr = 0;
  mod_t la_wr_mod = MOD_NONE;
  logic start = 0;
  logic [8:0] n_size = 0;
  logic idle;
  logic bit_valid = 0, bit_in = 0, bit_ready;
  logic out_valid, out_last;
  cplx_t out_data;

  int checks = 0, failures = 0;
  int max_err = 0;

  // mechanism counters
  int used_mode [9];
  int n_size_switch = 0, n_gap = 0, n_refused = 0, n_rewrite = 0;

  bit   bitq [$];      // bits accepted by the core
  mod_t shadow [256];  // testbench copy of the scheme table
  bit   in_frame = 0;
  int   last_sym_cycle, out_last_cycle, cycle = 0;

  always #5 clk = ~clk;

  ofdm_tx_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // bit source and monitor
  always @(posedge clk) begin
    cycle++;
    if (bit_valid && bit_ready) bitq.push_back(bit_in);
    if (in_frame && !bit_valid && bit_ready) n_gap++;
    if (in_frame && bit_valid && !bit_ready && !dut.u_ifft.in_ready && !dut.u_ifft.idle) n_refused++;
    if (dut.u_ifft.in_ready && dut.sym_valid) last_sym_cycle = cycle;
    if (out_last) out_last_cycle = cycle;
    bit_valid <= in_frame && ($urandom_range(0, 4) != 0);
    bit_in    <= 1'($urandom);
  end

  function automatic int lvl(int idx);
    int t [16] = '{-1, 1, -3, 3, -7, 7, -5, 5, -11, 11, -13, 13, -9, 9, -15, 15};
    return t[idx];
  endfunction

  function automatic real kfac(int n);
    case (n)
      1, 2: return 2.0;
      4: return 10.0;
      6: return 42.0;
      default: return 170.0;
    endcase
  endfunction

  task automatic program_table(int n, int frame);
    mod_t modes [6] = '{MOD_NONE, MOD_BPSK, MOD_QPSK, MOD_16QAM, MOD_64QAM, MOD_256QAM};
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      la_wr_en   = 1;
      la_wr_addr = 8'(k);
      la_wr_mod  = (k < 6) ? modes[(k + frame) % 6] : modes[$urandom_range(0, 5)];
      shadow[k]  = la_wr_mod;
    end
    @(negedge clk);
    la_wr_en = 0;
    n_rewrite++;
  endtask

  task automatic frame(int n, int fno);
    real xr [], xi [], ar, ai, ang;
    int nb, v, er, ei, bursts;
    bit prev_valid;
    cplx_t y [];
    xr = new[n]; xi = new[n]; y = new[n];
    v = 0; while ((1 << (2 * v)) < n) v++;
    program_table(n, fno);
    bitq.delete();
    while (!idle) @(posedge clk);
    @(negedge clk);
    if (n_size != 0 && n_size != 9'(n)) n_size_switch++;
    n_size = 9'(n); start = 1;
    @(negedge clk);
    start = 0;
    in_frame = 1;
    // collect the output burst
    nb = 0; bursts = 0; prev_valid = 0;
    while (1) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (!prev_valid) bursts++;
        y[nb] = out_data;
        nb++;
      end
      prev_valid = out_valid;
      if (out_valid && out_last) break;
    end
    in_frame = 0;
    @(posedge clk);   // let the monitor see the out_last edge
    #1;
    check(nb == n, $sformatf("frame %0d: %0d outputs", fno, nb));
    check(bursts == 1, "output in one burst");
    check(out_last_cycle - last_sym_cycle == 2 * n * v + n,
          $sformatf("IFFT latency %0d exp %0d", out_last_cycle - last_sym_cycle, 2 * n * v + n));
    // reference symbols from the accepted bits
    nb = 0;
    for (int k = 0; k < n; k++) begin
      int m, ii, qi;
      m = int'(shadow[k]);
      used_mode[m]++;
      ii = 0; qi = 0;
      for (int j = 0; j < m; j++) begin
        if (j % 2 == 0) ii += int'(bitq[nb + j]) << (j / 2);
        else            qi += int'(bitq[nb + j]) << (j / 2);
      end
      nb += m;
      if (m == 0) begin xr[k] = 0.0; xi[k] = 0.0; end
      else begin
        xr[k] = real'(lvl(ii)) / $sqrt(kfac(m)) * 16384.0;
        xi[k] = (m == 1) ? real'(-lvl(0)) / $sqrt(2.0) * 16384.0
                         : real'(-lvl(qi)) / $sqrt(kfac(m)) * 16384.0;
      end
    end
    check(bitq.size() == nb, $sformatf("frame %0d: core took %0d bits, schemes need %0d", fno, bitq.size(), nb));
    for (int t = 0; t < n; t++) begin
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < n; k++) begin
        ang = 2.0 * 3.14159265358979 * real'((k * t) % n) / real'(n);
        ar += xr[k] * $cos(ang) - xi[k] * $sin(ang);
        ai += xr[k] * $sin(ang) + xi[k] * $cos(ang);
      end
      er = int'(y[t].re) - $rtoi(ar / n);
      ei = int'(y[t].im) - $rtoi(ai / n);
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      check(er <= 6 && ei <= 6, $sformatf("frame %0d x(%0d) = (%0d,%0d) exp (%0.1f,%0.1f)",
            fno, t, y[t].re, y[t].im, ar / n, ai / n));
    end
  endtask

  initial begin
    int sizes [5] = '{64, 256, 64, 16, 256};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (sizes[f]) frame(sizes[f], f);
    foreach (used_mode[m]) if (m inside {0, 1, 2, 4, 6, 8})
      check(used_mode[m] > 0, $sformatf("scheme %0d never used", m));
    check(n_size_switch > 0, "no size switch");
    check(n_gap > 0, "no bit-source gap");
    check(n_refused > 0, "no refused bit");
    check(n_rewrite > 1, "no table rewrite");
    $display("schemes used: off %0d, BPSK %0d, QPSK %0d, 16QAM %0d, 64QAM %0d, 256QAM %0d",
             used_mode[0], used_mode[1], used_mode[2], used_mode[4], used_mode[6], used_mode[8]);
    $display("size switches %0d, bit gaps %0d, refused bits %0d, table rewrites %0d, largest error %0d LSB",
             n_size_switch, n_gap, n_refused, n_rewrite, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
