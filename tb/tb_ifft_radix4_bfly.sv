// tb_ifft_radix4_bfly: random and extreme inputs; each output is compared
// with floor((sum_k a_k * j^(m*k) + 2) / 4) computed with integer complex
// arithmetic in the testbench.
module tb_ifft_radix4_bfly;
  import qam_pkg::*;
  cplx_t a [4], y [4];
  int checks = 0, failures = 0;

  ifft_radix4_bfly dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv4(int s);
    return (s + 2) >>> 2;
  endfunction

  initial begin
    int sr, si, pr, pi;
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 4; k++) begin
        if (t < 2) begin
          a[k].re = (t == 0) ? 16'sh7fff : -16'sh8000;
          a[k].im = (t == 0) ? -16'sh8000 : 16'sh7fff;
        end else begin
          a[k].re = 16'($urandom);
          a[k].im = 16'($urandom);
        end
      end
      #1;
      for (int m = 0; m < 4; m++) begin
        sr = 0; si = 0;
        for (int k = 0; k < 4; k++) begin
          // multiply a_k by j^(m*k mod 4)
          case ((m * k) % 4)
            0: begin pr =  int'(a[k].re); pi =  int'(a[k].im); end
            1: begin pr = -int'(a[k].im); pi =  int'(a[k].re); end
            2: begin pr = -int'(a[k].re); pi = -int'(a[k].im); end
            default: begin pr = int'(a[k].im); pi = -int'(a[k].re); end
          endcase
          sr += pr; si += pi;
        end
        checks++;
        if (int'(y[m].re) != fdiv4(sr) || int'(y[m].im) != fdiv4(si)) begin
          failures++;
          $display("FAIL t=%0d m=%0d: %0d %0d exp %0d %0d", t, m, y[m].re, y[m].im, fdiv4(sr), fdiv4(si));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
