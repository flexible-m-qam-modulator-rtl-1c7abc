// bit_loading_table: per-subcarrier modulation scheme, as chosen by the link
// adaptation.
//
// A small register file of NMAX entries, one mod_t per subcarrier. The link
// adaptation (outside this design) writes entries with wr_en / wr_addr /
// wr_mod; the transmitter reads the scheme of subcarrier rd_addr
// combinationally. A write takes effect at the next clock edge. All entries
// reset to MOD_NONE (subcarrier off).
//
// That every subcarrier carries its own scheme follows the source; the table,
// its write port and its reset value are this design's choice.
module bit_loading_table
  import qam_pkg::*;
#(
  parameter int NMAX = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [$clog2(NMAX)-1:0] wr_addr,
  input  mod_t                    wr_mod,
  input  logic [$clog2(NMAX)-1:0] rd_addr,
  output mod_t                    rd_mod
);
  mod_t table_q [NMAX];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NMAX; k++) table_q[k] <= MOD_NONE;
    end else if (wr_en) begin
      table_q[wr_addr] <= wr_mod;
    end
  end

  assign rd_mod = table_q[rd_addr];

  wr_code_a : assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> mod_is_valid(wr_mod));
endmodule
