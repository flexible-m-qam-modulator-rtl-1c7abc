// tb_ifft_buffer: fills all 256 locations, then mixes random writes and
// reads against a shadow array; checks that real and imaginary parts are
// kept apart and that a read sees a write from the previous edge.
module tb_ifft_buffer;
  import qam_pkg::*;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  cplx_t wdata = '0, rdata;
  cplx_t shadow [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ifft_buffer dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = {16'($urandom), 16'($urandom)};
      shadow[a] = wdata;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 8'($urandom); wdata = {16'($urandom), 16'($urandom)};
      raddr = 8'($urandom);
      #1;
      checks++;
      if (rdata != shadow[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
