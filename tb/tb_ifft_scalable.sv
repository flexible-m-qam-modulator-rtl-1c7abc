// tb_ifft_scalable: the scalable IFFT at its default NMAX = 256.
//  1. The 4-point case with inputs 1+j, 1-j, 0, -1-j, whose exact outputs are
//     0.25-0.25j, 0.25+0.75j, 0.25+0.75j, 0.25-0.25j (bit-exact check).
//  2. Random frames at 16, 64 and 256 points, back to back, switching size
//     between frames; each output compared with a direct inverse DFT
//     x(n) = 1/N sum X(k) exp(+j 2 pi k n / N) in real arithmetic, within a
//     small tolerance for the fixed-point rounding.
// For every frame it checks the cycle count from start to out_last,
// N + 2*N*log4(N) + N (counting the start cycle and the out_last cycle), and that out_valid stays high for N cycles.
module tb_ifft_scalable;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0;
  logic [8:0] n_size = 0;
  cplx_t in_data = '0, out_data;
  logic idle, in_ready, out_valid, out_last;
  int checks = 0, failures = 0;
  int max_err = 0;

  always #5 clk = ~clk;

  ifft_scalable dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // run one frame; X given, returns outputs
  task automatic run(input int n, input cplx_t x_in [], output cplx_t y [], output int cycles);
    int cnt, v;
    y = new[n];
    v = 0; while ((1 << (2 * v)) < n) v++;
    while (!idle) @(posedge clk);
    n_size <= 9'(n); start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 1;
    for (int k = 0; k < n; k++) begin
      in_valid <= 1; in_data <= x_in[k];
      @(posedge clk);
      cycles++;
      #1;
    end
    in_valid <= 0;
    cnt = 0;
    while (1) begin
      #1;
      if (out_valid) begin
        y[cnt] = out_data;
        check(out_last == (cnt == n - 1), "out_last position");
        cnt++;
        if (out_last) break;
      end
      @(posedge clk);
      cycles++;
    end
    check(cnt == n, $sformatf("output count %0d", cnt));
    check(cycles == n + 2 * n * v + n, $sformatf("N=%0d cycles %0d exp %0d", n, cycles, n + 2 * n * v + n));
    @(posedge clk);
  endtask

  initial begin
    cplx_t x [], y [];
    int cyc, n, er, ei;
    real ar, ai, ang;
    int sizes [7] = '{16, 64, 256, 64, 16, 256, 4};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // 1. four-point case, exact
    x = new[4];
    x[0] = {16'sd16384, 16'sd16384};
    x[1] = {16'sd16384, -16'sd16384};
    x[2] = '0;
    x[3] = {-16'sd16384, -16'sd16384};
    run(4, x, y, cyc);
    check(y[0] == {16'sd4096, -16'sd4096}, "4pt x0");
    check(y[1] == {16'sd4096, 16'sd12288}, "4pt x1");
    check(y[2] == {16'sd4096, 16'sd12288}, "4pt x2");
    check(y[3] == {16'sd4096, -16'sd4096}, "4pt x3");
    // 2. random frames of several sizes
    foreach (sizes[s]) begin
      n = sizes[s];
      x = new[n];
      foreach (x[k]) x[k] = {16'($signed(16'($urandom)) >>> 2), 16'($signed(16'($urandom)) >>> 2)};
      run(n, x, y, cyc);
      for (int m = 0; m < n; m++) begin
        ar = 0.0; ai = 0.0;
        for (int k = 0; k < n; k++) begin
          ang = 2.0 * 3.14159265358979 * real'((k * m) % n) / real'(n);
          ar += real'(x[k].re) * $cos(ang) - real'(x[k].im) * $sin(ang);
          ai += real'(x[k].re) * $sin(ang) + real'(x[k].im) * $cos(ang);
        end
        er = int'(y[m].re) - $rtoi(ar / n);
        ei = int'(y[m].im) - $rtoi(ai / n);
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        check(er <= 6 && ei <= 6, $sformatf("N=%0d x(%0d) = (%0d,%0d) exp (%0.1f,%0.1f)", n, m, y[m].re, y[m].im, ar / n, ai / n));
      end
    end
    $display("largest error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
