// Linear array of B LU processing elements (b x b LU decomposition).
//
// Elements of a b x b matrix enter PE_1 on a_in in row-major order, one per
// cycle, and flow to the right through all PEs; PE_j computes column j of L
// and U. Results leave PE_B on lu_out, one per cycle, in row-major order,
// each tagged with its row and column: lu(x,y) appears B cycles after a(x,y)
// entered, so the last result of a matrix is produced in cycle B^2 + B - 1
// counting the cycle a(1,1) enters as cycle 1, and is visible on lu_out one
// cycle later. Matrices can follow each other without gaps: one matrix every
// B^2 cycles. The same stream format carries opL (rows of a block under the
// diagonal block) and opU (a block right of it, fed transposed). The LU chain
// entering PE_1 is empty; while an opLU runs, each PE copies its row of L from
// the chain (see lu_pe), which is what opU later needs.
//
// Only PEs and nearest-neighbour wires; the row/column indices travel with the
// data rather than being counted in each PE (both options are allowed by the
// design). en = 0 freezes every PE.
module lu_array
  import lu_pkg::*;
#(
  parameter int B = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  lu_tok_t a_in,
  output lu_tok_t lu_out
);

  lu_tok_t a_chain  [B+1];
  lu_tok_t lu_chain [B+1];

  assign a_chain[0]  = a_in;
  assign lu_chain[0] = '0;

  for (genvar j = 0; j < B; j++) begin : g_pe
    lu_pe #(.B(B), .J(j)) u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (en),
      .a_in   (a_chain[j]),
      .lu_in  (lu_chain[j]),
      .a_out  (a_chain[j+1]),
      .lu_out (lu_chain[j+1])
    );
  end

  assign lu_out = lu_chain[B];
  // a_chain[B], the elements leaving the last PE, is not needed.

endmodule
