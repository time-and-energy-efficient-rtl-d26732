// Matrix multiplication/subtraction array: R PEs in a line computing
// E = F - C x D on b x b blocks.
//
// One token enters per cycle. A b x b operation is split into b/R column
// groups; each group is b outer-product steps of b tokens (C[i][k], i fastest),
// so an operation occupies the array for b^3/R cycles, the effective latency
// the design gives for this array. D elements for the next step ride on the
// first R tokens of the current step (preload tokens give the first step of a
// group that has no predecessor). The results of a group are read out by the
// R*b tokens that follow it, each token carrying one F element, one read-out
// request and the write address of the result; they leave the last PE R
// cycles after entering. See mms_pe for the per-PE datapath.
module mms_array
  import lu_pkg::*;
#(
  parameter int B = 16,   // block size
  parameter int R = 16    // sub-block size = number of PEs
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  mms_tok_t t_in,
  output mms_tok_t t_out
);

  mms_tok_t chain [R+1];
  assign chain[0] = t_in;

  for (genvar j = 0; j < R; j++) begin : g_pe
    mms_pe #(.B(B), .J(j)) u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .t_in  (chain[j]),
      .t_out (chain[j+1])
    );
  end

  assign t_out = chain[R];

endmodule
