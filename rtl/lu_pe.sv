// Processing element PE_j of the LU linear array.
//
// PE_j owns column j of the factors: the lower half of its storage LU holds
// l(x,j) and u(x,j) at address x. Matrix elements arrive on a_in in row-major
// order, one per cycle, tagged with their row x, column y and operation. For
// an element of row x:
//   y < j : multiply-accumulate  RegT += a(x,y) * w   (for opLU only when the
//           element is an L value, x > y; always for opL/opU). w is LU[y]
//           = u(y,j) for opLU/opL and LU[b+y] = l(j,y) for opU.
//   y = j : subtract             t = a(x,j) - RegT, RegT cleared
//           x = j (opLU)  -> u(j,j) = t, RegR = 1/t from the reciprocal table
//           x < j (opLU)  -> u(x,j) = t
//           x > j (opLU), and every row of opL -> l(x,j) = t * RegR
//           every row of opU -> result t (the diagonal of L is 1)
//   The result is sent on LU_out in the same cycle; for opLU it is also written
//   to LU[x]. Where the result is an L value (or an opU result) it replaces the
//   element on a_out, so the PEs further right multiply with it.
//   y > j : the element only passes on.
// LU_out passes LU_in on in the cycles where this PE has no result; the
// schedule guarantees the two never coincide (asserted).
//
// Data path LU_in -> storage: opU (U12 = L11^-1 A12, computed on the
// transposed block) needs row j of L11 in PE_j. During opLU the values l(j,y),
// y < j, are produced in PE_y and pass PE_j on the LU chain; PE_j copies them
// into the upper half of its storage, LU[b+y]. The storage therefore has 2b
// words instead of b; this is this design's choice of how L11 reaches the
// storages. opL and opU use the storage and RegR left by the preceding opLU
// and never write them.
//
// The accumulation and the subtraction share one adder/subtractor as in the
// design; the normalisation has its own multiplier so that adder and
// multiplier do not form a combinational loop through shared operand muxes.
//
// Timing: a_out and LU_out are registered, one cycle per PE. An element that
// reaches PE_1 in cycle t reaches PE_j in cycle t+j-1. en = 0 freezes the PE
// (block disabling while the array is idle).
module lu_pe
  import lu_pkg::*;
#(
  parameter int B = 16,   // block size = PEs in the array
  parameter int J = 0     // index of this PE, 0-based
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  lu_tok_t a_in,
  input  lu_tok_t lu_in,
  output lu_tok_t a_out,
  output lu_tok_t lu_out
);

  localparam int SW = $clog2(2 * B);

  word_t store [2*B];
  word_t reg_t, reg_r;

  logic  is_acc, is_diag, is_lu, snoop;
  logic [SW-1:0] rd_addr;
  word_t prod, sum, norm, result, recip;
  logic signed [2*W-1:0] norm_full;

  recip_lut u_recip (.u(sum), .recip(recip));

  always_comb begin
    is_lu   = a_in.op == OP_LU;
    is_diag = a_in.valid && int'(a_in.y) == J;
    is_acc  = a_in.valid && int'(a_in.y) < J &&
              (a_in.op == OP_L || a_in.op == OP_U || (is_lu && a_in.x > a_in.y));
    snoop   = lu_in.valid && lu_in.op == OP_LU && int'(lu_in.x) == J && int'(lu_in.y) < J;

    rd_addr = (a_in.op == OP_U) ? SW'(B + int'(a_in.y)) : SW'(a_in.y);
    prod    = fx_mul(a_in.data, store[rd_addr]);
    // shared adder/subtractor: RegT + a*w, or a - RegT
    sum     = is_diag ? (a_in.data - reg_t) : (reg_t + prod);

    norm_full = sum * reg_r;
    norm      = word_t'(norm_full >>> NORM_SHIFT);

    unique case (a_in.op)
      OP_L:    result = norm;
      OP_U:    result = sum;
      default: result = (int'(a_in.x) > J) ? norm : sum;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_t  <= '0;
      reg_r  <= '0;
      a_out  <= '0;
      lu_out <= '0;
    end else if (en) begin
      if (is_diag)     reg_t <= '0;
      else if (is_acc) reg_t <= sum;

      if (is_diag && is_lu && int'(a_in.x) == J) reg_r <= recip;

      a_out <= a_in;
      if (is_diag && (a_in.op != OP_LU || int'(a_in.x) > J))
        a_out.data <= result;

      if (is_diag) lu_out <= '{valid: 1'b1, op: a_in.op, x: a_in.x, y: idx_t'(J), data: result};
      else         lu_out <= lu_in;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (is_diag && is_lu) store[SW'(a_in.x)] <= result;
      else if (snoop)       store[SW'(B + int'(lu_in.y))] <= lu_in.data;
    end
  end

  // A result and a passing element never meet on LU_out (this also keeps the
  // two storage writes apart).
  a_no_lu_collision: assert property (@(posedge clk) disable iff (!rst_n)
                                      (en && is_diag) |-> !lu_in.valid);

endmodule
