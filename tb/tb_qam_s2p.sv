// tb_qam_s2p: self-checking test of the serial-to-parallel converter.
// Loads random bit counts (0..8), feeds random bits with random gaps on
// bit_valid, and checks the assembled word, the `full` flag, that bit_ready
// drops after exactly n bits, and that `full` rises one cycle after the last
// bit (or right after start for n = 0).
module tb_qam_s2p;
  logic clk = 0, rst_n = 0;
  logic start = 0, bit_valid = 0, bit_in = 0, consume = 0;
  logic [3:0] nbits = 0;
  logic bit_ready, full;
  logic [7:0] word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qam_s2p dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_word;
    int n, got;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      n = $urandom_range(0, 8);
      nbits <= 4'(n); start <= 1;
      @(posedge clk);
      start <= 0;
      exp_word = '0;
      got = 0;
      while (got < n) begin
        bit_valid <= ($urandom_range(0, 3) != 0);
        bit_in    <= 1'($urandom);
        #1;
        @(posedge clk);
        if (bit_valid && bit_ready) begin
          exp_word[got] = bit_in;
          got++;
        end
      end
      bit_valid <= 1'b1;   // offered, must be refused
      #1;
      check(!bit_ready, "bit_ready after n bits");
      check(full, $sformatf("full after %0d bits", n));
      check(word == exp_word, $sformatf("word %h exp %h n=%0d", word, exp_word, n));
      @(posedge clk);
      check(word == exp_word, "extra bit was taken");
      bit_valid <= 0;
      consume <= 1;
      @(posedge clk);
      consume <= 0;
      #1;
      check(!full && !bit_ready, "idle after consume");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
