// tb_qam_ber: signal-quality check of the flexible modulator, bit error rate
// over an additive white Gaussian noise channel.
//
// Random bits are modulated by qam_mod_flex as 16-QAM (and, as a second
// point of reference, QPSK). The testbench adds Gaussian noise (Box-Muller
// from $urandom) of variance N0/2 per rail, with unit symbol energy and
// Eb = Es / bits-per-symbol, then demodulates with a hard nearest-level
// decision on each rail, using the Gray level order of the modulator's table,
// and counts bit errors. The measured BER at each Eb/N0 is compared with the
// exact Gray-coded values
//   16-QAM: Pb = 3/4 Q(a) + 1/2 Q(3a) - 1/4 Q(5a),  a = sqrt(4/5 * Eb/N0)
//   QPSK:   Pb = Q(sqrt(2 * Eb/N0))
// within 25 % (each point collects about 400 errors or more). A match shows
// that the single shared table with its Gray order and normalisation gives
// the BER of a standard Gray-mapped modulator.
module tb_qam_ber;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mod_valid = 0, bit_valid = 0, bit_in = 0, sym_ready = 0;
  mod_t mod_in = MOD_NONE;
  logic mod_ready, bit_ready, sym_valid;
  cplx_t sym;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qam_mod_flex dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979;

  function automatic real urand01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(2.0 * PI * urand01());
  endfunction

  // Q function via erfc approximation (Abramowitz and Stegun 7.1.26)
  function automatic real qfunc(real x);
    real z, t, e;
    z = x / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * z);
    e = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741
        + t * (-1.453152027 + t * 1.061405429)))) * $exp(-z * z);
    return 0.5 * e;
  endfunction

  // hard decision on one rail: index of nearest Gray level among 2^m
  function automatic int decide(real r, int m);
    int t [16] = '{-1, 1, -3, 3, -7, 7, -5, 5, -11, 11, -13, 13, -9, 9, -15, 15};
    int best;
    real d, bd;
    best = 0; bd = 1.0e9;
    for (int i = 0; i < (1 << m); i++) begin
      d = (r - real'(t[i])) * (r - real'(t[i]));
      if (d < bd) begin bd = d; best = i; end
    end
    return best;
  endfunction

  task automatic run_point(mod_t m, real ebn0_db, int nsym, real theory);
    int n, errs, tot, ii, qi, di, dq;
    logic [7:0] b;
    real sigma, scale, ri, rq, ber;
    n = int'(m);
    // unit Es; noise per rail sqrt(N0/2), N0 = Eb/(Eb/N0) = 1/(n * 10^(dB/10))
    sigma = $sqrt(1.0 / (real'(n) * $pow(10.0, ebn0_db / 10.0)) / 2.0);
    scale = (n == 2) ? $sqrt(2.0) : $sqrt(10.0);   // back to integer levels
    errs = 0; tot = 0;
    for (int s = 0; s < nsym; s++) begin
      mod_in <= m; mod_valid <= 1;
      do @(posedge clk); while (!mod_ready);
      mod_valid <= 0;
      b = 8'($urandom);
      for (int j = 0; j < n; j++) begin
        bit_in <= b[j]; bit_valid <= 1;
        do @(posedge clk); while (!bit_ready);
      end
      bit_valid <= 0;
      while (!sym_valid) @(posedge clk);
      ri = (real'(sym.re) / 16384.0 + sigma * gauss()) * scale;
      rq = (real'(sym.im) / 16384.0 + sigma * gauss()) * scale;
      di = decide(ri, n / 2);
      dq = decide(-rq, n / 2);
      ii = 0; qi = 0;
      for (int j = 0; j < n; j++)
        if (j % 2 == 0) ii += int'(b[j]) << (j / 2); else qi += int'(b[j]) << (j / 2);
      errs += $countones(4'(di ^ ii)) + $countones(4'(dq ^ qi));
      tot  += n;
      sym_ready <= 1;
      @(posedge clk);
      sym_ready <= 0;
    end
    ber = real'(errs) / real'(tot);
    $display("%s Eb/N0 = %4.1f dB: BER %e (%0d errors in %0d bits), theory %e",
             m.name(), ebn0_db, ber, errs, tot, theory);
    checks++;
    if (ber < 0.75 * theory || ber > 1.25 * theory) begin
      failures++;
      $display("FAIL BER off theory");
    end
  endtask

  initial begin
    real g, a;
    real dbs [4] = '{2.0, 4.0, 6.0, 8.0};
    int  nsy [4] = '{2000, 3000, 4000, 12000};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (dbs[i]) begin
      g = $pow(10.0, dbs[i] / 10.0);
      a = $sqrt(0.8 * g);
      run_point(MOD_16QAM, dbs[i], nsy[i], 0.75 * qfunc(a) + 0.5 * qfunc(3.0 * a) - 0.25 * qfunc(5.0 * a));
    end
    g = $pow(10.0, 0.4);
    run_point(MOD_QPSK, 4.0, 20000, qfunc($sqrt(2.0 * g)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
