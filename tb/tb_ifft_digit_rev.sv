// tb_ifft_digit_rev: for every size 4..256 and every index, compares with the
// base-4 digit reversal computed by repeated division by 4.
module tb_ifft_digit_rev;
  logic [7:0] idx, rev;
  logic [4:0] log4n;
  int checks = 0, failures = 0;

  ifft_digit_rev dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, x;
    for (int v = 1; v <= 4; v++) begin
      for (int i = 0; i < (1 << (2 * v)); i++) begin
        idx = 8'(i); log4n = 5'(v);
        #1;
        x = i; e = 0;
        for (int d = 0; d < v; d++) begin e = e * 4 + x % 4; x = x / 4; end
        checks++;
        if (int'(rev) != e) begin failures++; $display("FAIL v=%0d i=%0d: %0d exp %0d", v, i, rev, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
