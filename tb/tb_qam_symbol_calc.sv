// tb_qam_symbol_calc: exhaustive test of the I/Q index calculation.
// For every scheme (0, 1, 2, 4, 6, 8 bits) and every 8-bit word the expected
// indices are built by gathering even bits (I) and odd bits (Q) of the first
// n bits; BPSK has Q index 0 and the zero-bit case raises `zero`.
module tb_qam_symbol_calc;
  logic [3:0] nbits;
  logic [7:0] bits;
  logic [3:0] sym_i, sym_q;
  logic zero;
  int checks = 0, failures = 0;

  qam_symbol_calc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int modes [6] = '{0, 1, 2, 4, 6, 8};
    int ei, eq;
    foreach (modes[m]) begin
      for (int w = 0; w < 256; w++) begin
        nbits = 4'(modes[m]);
        bits  = 8'(w);
        ei = 0; eq = 0;
        for (int j = 0; j < modes[m]; j++) begin
          if (j % 2 == 0) ei += int'(bits[j]) << (j / 2);
          else            eq += int'(bits[j]) << (j / 2);
        end
        #1;
        checks++;
        if (int'(sym_i) != ei || int'(sym_q) != eq || zero != (modes[m] == 0)) begin
          failures++;
          $display("FAIL n=%0d w=%h: i=%0d/%0d q=%0d/%0d", modes[m], w, sym_i, ei, sym_q, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
