// tb_qam_lut: checks the shared level table against the 16 Gray-coded levels
// of the flexible modulator, for I and the negated Q, and checks that the
// QPSK, 16-QAM and 64-QAM entries are the leading part of the table (the
// nesting of the constellations), by comparing with the levels read off the
// 64-QAM constellation grid: columns left to right hold I indices
// 4 6 2 0 1 3 7 5 -> levels -7 -5 -3 -1 1 3 5 7.
module tb_qam_lut;
  logic [3:0] idx_i, idx_q;
  logic signed [4:0] level_i, level_q;
  int checks = 0, failures = 0;

  qam_lut dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_lv [16] = '{-1, 1, -3, 3, -7, 7, -5, 5, -11, 11, -13, 13, -9, 9, -15, 15};
    int col_idx [8] = '{4, 6, 2, 0, 1, 3, 7, 5};
    for (int i = 0; i < 16; i++) begin
      for (int q = 0; q < 16; q++) begin
        idx_i = 4'(i); idx_q = 4'(q);
        #1;
        checks++;
        if (int'(level_i) != exp_lv[i] || int'(level_q) != -exp_lv[q]) begin
          failures++;
          $display("FAIL i=%0d q=%0d: %0d %0d", i, q, level_i, level_q);
        end
      end
    end
    for (int c = 0; c < 8; c++) begin
      idx_i = 4'(col_idx[c]); idx_q = 4'(col_idx[c]);
      #1;
      checks++;
      if (int'(level_i) != 2 * c - 7 || int'(level_q) != 7 - 2 * c) begin
        failures++;
        $display("FAIL grid column %0d: %0d", c, level_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
