// Shared types and constants of the block LU decomposition engine.
//
// All arithmetic is 16-bit two's-complement fixed point with FRAC fractional
// bits (Q8.8 by default); the 16-bit word width follows the design's stated
// precision, the split into integer and fraction bits is this design's choice.
// Sums and products wrap on overflow; a product is formed at full width and
// arithmetically shifted right (truncation towards minus infinity) before it
// is added.
//
// Two token formats travel along the two linear arrays:
//   lu_tok_t  - one matrix element with its row/column index and the
//               operation it belongs to (a-path and LU-path of the LU array)
//   mms_tok_t - one cycle's worth of work for the multiply/subtract array
//               (one C element, one D element for a PE's next-row register,
//               one read-out request with its F element and write address)
package lu_pkg;

  localparam int W        = 16;   // data word width
  localparam int FRAC     = 8;    // fractional bits of a data word
  localparam int IW       = 10;   // width of row/column indices (matrices up to 1024)
  localparam int AW       = 20;   // memory bank word address width (1024 x 1024)

  // Reciprocal table: 1024 entries of Round(2^RECIP_M / idx), indexed by the
  // magnitude of the divisor shifted right by RECIP_SHIFT.
  localparam int RECIP_DEPTH = 1024;
  localparam int RECIP_AW    = 10;
  localparam int RECIP_M     = 15;
  localparam int RECIP_SHIFT = 6;
  // u ~ idx * 2^(RECIP_SHIFT-FRAC), so x / u in Q(FRAC) is (x * Inv) >>> NORM_SHIFT
  localparam int NORM_SHIFT  = RECIP_M + RECIP_SHIFT - FRAC;

  typedef logic signed [W-1:0] word_t;
  typedef logic [IW-1:0]       idx_t;
  typedef logic [AW-1:0]       addr_t;

  // Operations of the LU array: full LU of a diagonal block, L of a block
  // below it, U of a block right of it (fed transposed).
  typedef enum logic [1:0] {
    OP_LU = 2'd0,
    OP_L  = 2'd1,
    OP_U  = 2'd2
  } lu_op_e;

  typedef struct packed {
    logic   valid;
    lu_op_e op;
    idx_t   x;     // row index (0-based)
    idx_t   y;     // column index (0-based)
    word_t  data;
  } lu_tok_t;

  typedef enum logic [1:0] {
    MK_IDLE  = 2'd0,   // carries nothing for the datapath (read-outs only)
    MK_RUN   = 2'd1,   // one C element of an outer-product step
    MK_PRE   = 2'd2    // D preload before the first step of a group
  } mms_kind_e;

  typedef struct packed {
    logic      valid;
    mms_kind_e kind;
    idx_t      i;        // row of C / accumulator address
    idx_t      k;        // outer-product step (column of C, row of D)
    word_t     c;        // C[i][k]
    logic      d_valid;  // d is the next D row element for PE d_slot
    idx_t      d_slot;
    word_t     d;
    logic      rd_valid; // PE rd_slot reads out result row rd_row
    idx_t      rd_slot;
    idx_t      rd_row;
    word_t     f;        // F element subtracted from the read-out sum
    addr_t     wb_addr;  // where the result E = F - sum is written
    logic      res_valid;
    word_t     res;
  } mms_tok_t;

  // Fixed-point helpers shared by the datapath.
  function automatic word_t fx_mul(word_t a, word_t b);
    logic signed [2*W-1:0] p;
    p = a * b;
    return word_t'(p >>> FRAC);
  endfunction

endpackage
