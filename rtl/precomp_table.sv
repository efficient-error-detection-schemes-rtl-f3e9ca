// precomp_table: table of the precomputed multiples P, 2P, ..., (2^W)P used
// by the window method.
//
// Entry i holds (i+1)P in projective coordinates; the main loop reads entry
// value-1 for a non-zero window value. The table has 2^W entries, one per
// pass of the precomputation loop; the last entry, (2^W)P, is filled but
// never read, as in the algorithm it follows.
//
// Interface: one synchronous write port (we/waddr/wdata, written on the
// rising clock edge) and one asynchronous read port (raddr -> rdata, same
// cycle), i.e. a small distributed RAM. Contents are not reset.
//
// The table's contents and depth follow the published window method; the
// memory organisation (ports, asynchronous read) is this design's choice.
module precomp_table
  import ecc_pkg::*;
#(
  parameter int unsigned W = 3   // window length
) (
  input  logic         clk,
  input  logic         we,
  input  logic [W-1:0] waddr,
  input  point_t       wdata,
  input  logic [W-1:0] raddr,
  output point_t       rdata
);

  point_t mem [2**W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
