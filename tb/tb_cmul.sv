// tb_cmul: random samples times random and unit twiddle factors; compares
// with round((ar*wr - ai*wi) / 2^14) and round((ar*wi + ai*wr) / 2^14),
// saturated to 16 bits, computed with 64-bit integers in the testbench.
module tb_cmul;
  import qam_pkg::*;
  cplx_t a, p;
  logic signed [15:0] w_re, w_im;
  int checks = 0, failures = 0;

  cmul dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rs(longint x);
    longint r;
    r = (x + 8192) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    longint er, ei;
    for (int t = 0; t < 5000; t++) begin
      a.re = 16'($urandom); a.im = 16'($urandom);
      case (t % 4)
        0: begin w_re = 16'sd16384; w_im = 16'sd0; end
        1: begin w_re = 16'sd0; w_im = 16'sd16384; end
        default: begin w_re = 16'($signed(16'($urandom)) >>> 1); w_im = 16'($signed(16'($urandom)) >>> 1); end
      endcase
      #1;
      er = rs(longint'(a.re) * w_re - longint'(a.im) * w_im);
      ei = rs(longint'(a.re) * w_im + longint'(a.im) * w_re);
      checks++;
      if (longint'(p.re) != er || longint'(p.im) != ei) begin
        failures++;
        $display("FAIL %0d %0d * %0d %0d = %0d %0d exp %0d %0d", a.re, a.im, w_re, w_im, p.re, p.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
