// Processing element of the matrix multiplication/subtraction (MMS) array.
//
// The array computes E = F - C x D for b x b blocks with r PEs. PE_j works on
// one column c of E at a time (c = g*r + j in column group g) and keeps the
// partial sums of that column for all b rows in its storage CBUF. The product
// is formed as a sequence of outer-product steps k = 0..b-1: during step k the
// elements C[0..b-1][k] stream past, one per cycle, and PE_j adds
// C[i][k] * D[k][c] into CBUF[i]. D[k][c] is held in the register DCUR; the
// value for the next step arrives earlier on the token's d field and waits in
// DNEXT (double buffering), and is moved to DCUR by the first token (i = 0) of
// a step. At the last step the completed sum goes into the second storage
// COBUF, so the next column group can start at once. A read-out request on a
// later token (rd_slot = j) takes COBUF[rd_row], subtracts it from the F
// element carried by the same token and puts E on the token's res field; the
// token carries it to the end of the array. Every PE thus has one multiplier,
// one accumulating adder, the subtractor for F - sum, and two storages.
//
// The design specifies the operation, the number of PEs (r) and the effective
// latency b^3/r of this array, but takes its internals from earlier work; this
// outer-product organisation with token-carried operands is this design's own.
//
// Timing: tokens are registered once per PE; a token leaves the array r
// cycles after entering it. en = 0 freezes the PE.
module mms_pe
  import lu_pkg::*;
#(
  parameter int B = 16,   // block size (rows of a column, storage depth)
  parameter int J = 0     // index of this PE, 0-based
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  mms_tok_t t_in,
  output mms_tok_t t_out
);

  localparam int SW = (B > 1) ? $clog2(B) : 1;

  word_t cbuf  [B];
  word_t cobuf [B];
  word_t dnext, dcur;

  logic  run, last_step, d_hit, rd_hit;
  word_t d_op, prod, partial, e;

  always_comb begin
    run       = t_in.valid && t_in.kind == MK_RUN;
    last_step = t_in.k == idx_t'(B-1);
    d_hit     = t_in.valid && t_in.d_valid && t_in.d_slot == idx_t'(J);
    rd_hit    = t_in.valid && t_in.rd_valid && t_in.rd_slot == idx_t'(J);
    d_op      = (t_in.i == '0) ? dnext : dcur;
    prod      = fx_mul(t_in.c, d_op);
    partial   = ((t_in.k == '0) ? word_t'(0) : cbuf[SW'(t_in.i)]) + prod;
    e         = t_in.f - cobuf[SW'(t_in.rd_row)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dnext <= '0;
      dcur  <= '0;
      t_out <= '0;
    end else if (en) begin
      if (d_hit) dnext <= t_in.d;
      if (run && t_in.i == '0) dcur <= dnext;
      t_out <= t_in;
      if (rd_hit) begin
        t_out.res_valid <= 1'b1;
        t_out.res       <= e;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en && run) begin
      if (last_step) cobuf[SW'(t_in.i)] <= partial;
      else           cbuf[SW'(t_in.i)]  <= partial;
    end
  end

  // A read-out slot must be free when it reaches its PE.
  a_single_readout: assert property (@(posedge clk) disable iff (!rst_n)
                                     (en && rd_hit) |-> !t_in.res_valid);

endmodule
