// tb_ifft_addr_gen: for every size 4..256 walks the whole loop and compares
// each butterfly's four addresses and twiddle indices with a reference loop
// nest written in the testbench. Also checks that within a stage every
// address is visited exactly once, that stage 1 of a 64-point transform uses
// W^(0n,1n,2n,3n) (table steps of 4), that the walk has (N/4)*log4(N)
// butterflies and that `done` comes with the last one. `next` is held off at
// random to check the generator waits.
module tb_ifft_addr_gen;
  logic clk = 0, rst_n = 0;
  logic start = 0, next = 0;
  logic [4:0] log4n = 0, stage;
  logic active, done;
  logic [7:0] addr [4], tw_idx [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ifft_addr_gen dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n, ng, ne, nb, seen [256];
    bit ok;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int v = 1; v <= 4; v++) begin
      n = 1 << (2 * v);
      @(posedge clk);
      log4n <= 5'(v); start <= 1;
      @(posedge clk);
      start <= 0;
      nb = 0;
      for (int s = 0; s < v; s++) begin
        ng = 1 << (2 * s);
        ne = n / (4 * ng);
        foreach (seen[i]) seen[i] = 0;
        for (int g = 0; g < ng; g++) begin
          for (int e = 0; e < ne; e++) begin
            // random hold-off
            while ($urandom_range(0, 3) == 0) begin
              next <= 0;
              @(posedge clk);
            end
            #1;
            ok = active && (int'(stage) == s);
            for (int k = 0; k < 4; k++) begin
              ok &= (int'(addr[k]) == g * 4 * ne + k * ne + e);
              ok &= (int'(tw_idx[k]) == ((k * e * ng) * (256 / n)) % 256);
              seen[addr[k]]++;
            end
            check(ok, $sformatf("v=%0d s=%0d g=%0d e=%0d addr %0d %0d %0d %0d tw %0d %0d %0d %0d",
                  v, s, g, e, addr[0], addr[1], addr[2], addr[3], tw_idx[0], tw_idx[1], tw_idx[2], tw_idx[3]));
            if (v == 3 && s == 0 && e == 1)
              check(tw_idx[1] == 4 && tw_idx[2] == 8 && tw_idx[3] == 12, "64-pt stage 1 twiddles");
            nb++;
            next <= 1;
            #1;
            check(done == (s == v - 1 && g == ng - 1 && e == ne - 1), "done timing");
            @(posedge clk);
            next <= 0;
          end
        end
        ok = 1;
        for (int i = 0; i < n; i++) ok &= (seen[i] == 1);
        check(ok, $sformatf("v=%0d stage %0d coverage", v, s));
      end
      #1;
      check(!active, "inactive after walk");
      check(nb == (n / 4) * v, "butterfly count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
