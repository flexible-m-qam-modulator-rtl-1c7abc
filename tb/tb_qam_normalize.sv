// tb_qam_normalize: for every scheme code compares
// the scaled outputs, for each level the scheme can produce (up to +-1,
// +-3, +-7, +-15), with level / sqrt(k) * 2^14 computed in real arithmetic
// (k = 2, 2, 10, 42, 170 for 1, 2, 4, 6, 8 bits), allowing one LSB; a
// zero-bit scheme must give 0.
module tb_qam_normalize;
  import qam_pkg::*;
  logic [3:0] mode;
  logic signed [4:0] level_i, level_q;
  sample_t out_i, out_q;
  int checks = 0, failures = 0;

  qam_normalize dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ideal(int lv, int n);
    real k;
    case (n)
      1, 2: k = 2.0;
      4: k = 10.0;
      6: k = 42.0;
      8: k = 170.0;
      default: return 0;
    endcase
    return $rtoi(real'(lv) / $sqrt(k) * 16384.0 + (lv < 0 ? -0.5 : 0.5));
  endfunction

  initial begin
    int modes [6] = '{0, 1, 2, 4, 6, 8};
    int ei, eq, di, dq;
    int lmax [6] = '{15, 1, 1, 3, 7, 15};
    foreach (modes[m]) begin
      for (int lv = -lmax[m]; lv <= lmax[m]; lv++) begin
        mode = 4'(modes[m]);
        level_i = 5'(lv);
        level_q = 5'(-lv);
        #1;
        ei = ideal(lv, modes[m]);
        eq = ideal(-lv, modes[m]);
        di = int'(out_i) - ei; dq = int'(out_q) - eq;
        checks++;
        if (di > 1 || di < -1 || dq > 1 || dq < -1) begin
          failures++;
          $display("FAIL n=%0d lv=%0d: %0d/%0d %0d/%0d", modes[m], lv, out_i, ei, out_q, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
