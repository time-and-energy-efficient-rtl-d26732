// Memory bank holding the n x n matrix of the block LU decomposition.
//
// Both PE sets read their operands from here and write their results back in
// place, so at the end the bank holds L (strictly below the diagonal, unit
// diagonal implied) and U (on and above the diagonal). Element (row, col) is
// at word address row*N + col. The bank has NR read ports and NW write ports
// so that the LU array (one read, one write per cycle) and the MMS array
// (C, D and F reads, one write per cycle) run at the same time; the design
// names one memory bank connected to both PE sets and states three on-chip
// memories for the MMS operation and two for the LU operations, the port
// counts here follow from that. Reads are registered (data one cycle after
// the address, as a block RAM gives it). Writes to one address from two ports
// in the same cycle are a scheduling error (asserted); the higher port wins.
module mem_bank
  import lu_pkg::*;
#(
  parameter int N  = 256,  // matrix size
  parameter int NR = 4,    // read ports
  parameter int NW = 2     // write ports
) (
  input  logic  clk,
  input  addr_t raddr [NR],
  output word_t rdata [NR],
  input  logic  we    [NW],
  input  addr_t waddr [NW],
  input  word_t wdata [NW]
);

  localparam int DEPTH = N * N;
  localparam int MW    = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NW; p++)
      if (we[p]) mem[MW'(waddr[p])] <= wdata[p];
    for (int p = 0; p < NR; p++)
      rdata[p] <= mem[MW'(raddr[p])];
  end

  for (genvar p = 1; p < NW; p++) begin : g_wchk
    a_no_write_clash: assert property (@(posedge clk)
      !(we[0] && we[p] && waddr[0] == waddr[p]));
  end

endmodule
