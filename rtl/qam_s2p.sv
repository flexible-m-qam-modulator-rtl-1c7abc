// qam_s2p: serial-to-parallel converter in front of the flexible modulator.
//
// The modulator receives its data bits one at a time. A pulse on `start`
// loads the number of bits of the coming symbol (0..MAX_BITS) and clears the
// word. Bits are then taken with a valid/ready handshake on bit_valid /
// bit_ready; the first bit taken becomes b0, the next b1 and so on. `full`
// rises in the cycle after the last bit is taken (immediately after `start`
// for a zero-bit symbol) and stays high until `consume` is pulsed. Bit
// positions above the requested count read as 0.
//
// That a serial-to-parallel converter forms each symbol follows the source;
// the arrival order (b0 first) and the handshake are this design's choice.
module qam_s2p
  import qam_pkg::*;
#(
  parameter int MAXB = MAX_BITS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(MAXB+1)-1:0] nbits,
  input  logic                     bit_valid,
  input  logic                     bit_in,
  output logic                     bit_ready,
  output logic [MAXB-1:0]          word,
  output logic                     full,
  input  logic                     consume
);
  localparam int CW = $clog2(MAXB+1);

  logic          busy;
  logic [CW-1:0] cnt, target;

  assign bit_ready = busy && (cnt < target);
  assign full      = busy && (cnt == target);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      target <= '0;
      word   <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      cnt    <= '0;
      target <= nbits;
      word   <= '0;
    end else begin
      if (bit_valid && bit_ready) begin
        word[cnt[$clog2(MAXB)-1:0]] <= bit_in;
        cnt                         <= cnt + 1'b1;
      end
      if (consume) busy <= 1'b0;
    end
  end

  start_while_busy_a : assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy || consume);
  nbits_range_a : assert property (@(posedge clk) disable iff (!rst_n)
    start |-> nbits <= CW'(MAXB));
endmodule
