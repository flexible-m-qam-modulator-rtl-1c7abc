// tb_qam_mod_flex: end-to-end test of the flexible M-QAM modulator.
// Random schemes (none, BPSK, QPSK, 16/64/256-QAM) and random serial bits,
// with random gaps on bit_valid and random back-pressure on sym_ready. The
// reference maps each symbol with its own model: even bits -> I level,
// odd bits -> Q level (negated), through the 16-entry Gray level table, then
// scales by 1/sqrt(k) in real arithmetic (one LSB allowed). With bits offered
// every cycle and no back-pressure, sym_valid must rise exactly n+1 clock
// edges after the edge that accepts the scheme.
module tb_qam_mod_flex;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mod_valid = 0, bit_valid = 0, bit_in = 0, sym_ready = 0;
  mod_t mod_in = MOD_NONE;
  logic mod_ready, bit_ready, sym_valid;
  cplx_t sym;
  int checks = 0, failures = 0;
  int counts [9];

  always #5 clk = ~clk;

  qam_mod_flex dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  function automatic int rnd(real v);
    return $rtoi(v + (v < 0.0 ? -0.5 : 0.5));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    mod_t modes [6] = '{MOD_NONE, MOD_BPSK, MOD_QPSK, MOD_16QAM, MOD_64QAM, MOD_256QAM};
    int n, got, ii, qi, ei, eq, cyc;
    bit gaps;
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 600; t++) begin
      mod_t m;
      m = modes[$urandom_range(0, 5)];
      n = int'(m);
      gaps = (t % 2 == 1);
      counts[n]++;
      mod_in <= m; mod_valid <= 1;
      do @(posedge clk); while (!mod_ready);
      mod_valid <= 0;
      cyc = 0;
      b = '0; got = 0;
      while (!sym_valid) begin
        bit_valid <= gaps ? 1'($urandom) : 1'b1;
        bit_in    <= 1'($urandom);
        #1;
        if (bit_valid && bit_ready) begin b[got] = bit_in; got++; end
        @(posedge clk);
        cyc++;
        #1;
      end
      bit_valid <= 0;
      check(got == n, $sformatf("took %0d bits for n=%0d", got, n));
      if (!gaps) check(cyc == n + 1, $sformatf("latency %0d for n=%0d", cyc, n));
      ii = 0; qi = 0;
      if (n == 1) ii = b[0];
      else for (int j = 0; j < n; j++)
        if (j % 2 == 0) ii += int'(b[j]) << (j / 2); else qi += int'(b[j]) << (j / 2);
      if (n == 0) begin ei = 0; eq = 0; end
      else begin
        ei = rnd(real'(lvl(ii)) / $sqrt(kfac(n)) * 16384.0);
        eq = rnd(real'(-lvl(qi)) / $sqrt(kfac(n)) * 16384.0);
      end
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk);
        check(sym_valid, "symbol dropped without ready");
      end
      check((int'(sym.re) - ei) inside {[-1:1]} && (int'(sym.im) - eq) inside {[-1:1]},
            $sformatf("n=%0d bits=%h got (%0d,%0d) exp (%0d,%0d)", n, b, sym.re, sym.im, ei, eq));
      sym_ready <= 1;
      @(posedge clk);
      sym_ready <= 0;
    end
    foreach (modes[k]) check(counts[int'(modes[k])] > 0, "scheme never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
