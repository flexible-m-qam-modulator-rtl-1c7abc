// tb_bit_loading_table: checks that every entry resets to MOD_NONE, that
// random writes are read back per subcarrier against a shadow copy, and that
// a write takes effect at the next clock edge.
module tb_bit_loading_table;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  mod_t wr_mod = MOD_NONE, rd_mod;
  mod_t shadow [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bit_loading_table dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    mod_t modes [6] = '{MOD_NONE, MOD_BPSK, MOD_QPSK, MOD_16QAM, MOD_64QAM, MOD_256QAM};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = 0; a < 256; a++) begin
      rd_addr = 8'(a); #1;
      check(rd_mod == MOD_NONE, "reset value");
      shadow[a] = MOD_NONE;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      wr_en   = 1'($urandom);
      wr_addr = 8'($urandom);
      wr_mod  = modes[$urandom_range(0, 5)];
      rd_addr = wr_addr;
      #1;
      check(rd_mod == shadow[rd_addr], "value before write edge");
      @(posedge clk);
      if (wr_en) shadow[wr_addr] = wr_mod;
      #1;
      check(rd_mod == shadow[rd_addr], "write-then-read");
      rd_addr = 8'($urandom);
      #1;
      check(rd_mod == shadow[rd_addr], "random read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
