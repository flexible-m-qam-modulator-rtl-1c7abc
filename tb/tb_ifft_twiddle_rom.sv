// tb_ifft_twiddle_rom: compares every entry with cos/sin(2*pi*k/256)*2^14
// (one LSB allowed), and checks that the 64-point factors are the subset at
// every fourth entry, e.g. W_64^(-16) = +j at entry 64.
module tb_ifft_twiddle_rom;
  logic [7:0] idx;
  logic signed [15:0] tw_re, tw_im;
  int checks = 0, failures = 0;

  ifft_twiddle_rom dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a;
    int er, ei;
    for (int k = 0; k < 256; k++) begin
      idx = 8'(k);
      #1;
      a = 2.0 * 3.14159265358979 * k / 256.0;
      er = $rtoi($cos(a) * 16384.0 + ($cos(a) < 0 ? -0.5 : 0.5));
      ei = $rtoi($sin(a) * 16384.0 + ($sin(a) < 0 ? -0.5 : 0.5));
      checks++;
      if ((int'(tw_re) - er) > 1 || (int'(tw_re) - er) < -1 ||
          (int'(tw_im) - ei) > 1 || (int'(tw_im) - ei) < -1) begin
        failures++;
        $display("FAIL k=%0d: %0d %0d exp %0d %0d", k, tw_re, tw_im, er, ei);
      end
    end
    idx = 8'd64; #1;
    checks++;
    if (tw_re != 0 || tw_im != 16384) begin failures++; $display("FAIL +j"); end
    idx = 8'd128; #1;
    checks++;
    if (tw_re != -16384 || tw_im != 0) begin failures++; $display("FAIL -1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
