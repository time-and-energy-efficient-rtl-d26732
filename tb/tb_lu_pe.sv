// Testbench of one LU processing element, PE_5 of a 16-PE array, driven with
// exactly the element stream that reaches PE_5 in the array (row-major, L
// values of columns < 5 already substituted upstream) for opLU of a 16 x 16
// block, then opL on the block below it and opU on the block right of it
// (fed transposed). The LU chain input carries the values l(5,y), y < 5, as
// the upstream PEs would send them, in cycles where PE_5 has no result of its
// own. Checked, against the reference model: every result on LU_out with its
// tags, the element passed on a_out (replaced by the result where the PE
// produces an L value or an opU result, untouched otherwise), and the LU chain
// passing through one cycle later.
module tb_lu_pe;
  import lu_pkg::*;
  import lu_ref_pkg::*;

  localparam int B = 16;
  localparam int J = 5;
  localparam int N2 = 2 * B;

  logic    clk = 0, rst_n = 0, en = 1;
  lu_tok_t a_in, lu_in, a_out, lu_out;

  lu_pe #(.B(B), .J(J)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  w16 orig [], refm [];

  // expected outputs one cycle after the inputs
  lu_tok_t exp_a, exp_lu;
  logic    chk = 0;

  task automatic check_outputs();
    checks++;
    if (a_out !== exp_a) begin
      failures++;
      if (failures < 10) $display("a_out (%0d,%0d): got %0d expected %0d", exp_a.x, exp_a.y,
                                  a_out.data, exp_a.data);
    end
    checks++;
    if (lu_out !== exp_lu) begin
      failures++;
      if (failures < 10) $display("lu_out: got v%0d (%0d,%0d) %0d expected v%0d (%0d,%0d) %0d",
                                  lu_out.valid, lu_out.x, lu_out.y, lu_out.data,
                                  exp_lu.valid, exp_lu.x, exp_lu.y, exp_lu.data);
    end
  endtask

  // one element; value_in as it reaches PE_J, result the expected output at y == J
  task automatic step(lu_op_e op, int x, int y, w16 value_in, w16 result, lu_tok_t chain);
    a_in  <= '{valid: 1'b1, op: op, x: idx_t'(x), y: idx_t'(y), data: value_in};
    lu_in <= chain;
    @(posedge clk);
    #1;
    exp_a = '{valid: 1'b1, op: op, x: idx_t'(x), y: idx_t'(y), data: value_in};
    if (y == J && (op != OP_LU || x > J)) exp_a.data = result;
    if (y == J) exp_lu = '{valid: 1'b1, op: op, x: idx_t'(x), y: idx_t'(J), data: result};
    else        exp_lu = chain;
    check_outputs();
  endtask

  initial begin
    lu_tok_t none;
    none = '0;
    make_matrix(N2, 8 * 256, 160);
    orig = m;
    block_lu(N2, B);
    refm = m;

    a_in = '0;
    lu_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // opLU of block (0,0); l(J,y) arrive on the LU chain during row 0
    for (int x = 0; x < B; x++)
      for (int y = 0; y < B; y++) begin
        w16 v;
        lu_tok_t ch;
        v = (y < J && x > y) ? refm[ix(N2, x, y)] : orig[ix(N2, x, y)];
        ch = none;
        if (x == 0 && y < J)
          ch = '{valid: 1'b1, op: OP_LU, x: idx_t'(J), y: idx_t'(y), data: refm[ix(N2, J, y)]};
        if (x == 1 && y == 0)   // a passing result of another PE, not for this one
          ch = '{valid: 1'b1, op: OP_LU, x: idx_t'(2), y: idx_t'(1), data: w16'(77)};
        step(OP_LU, x, y, v, refm[ix(N2, x, J)], ch);
      end
    // opL of block (1,0)
    for (int x = 0; x < B; x++)
      for (int y = 0; y < B; y++) begin
        w16 v;
        v = (y < J) ? refm[ix(N2, B + x, y)] : orig[ix(N2, B + x, y)];
        step(OP_L, x, y, v, refm[ix(N2, B + x, J)], none);
      end
    // opU of block (0,1), transposed: element (x,y) is A12(y,x)
    for (int x = 0; x < B; x++)
      for (int y = 0; y < B; y++) begin
        w16 v;
        v = (y < J) ? refm[ix(N2, y, B + x)] : orig[ix(N2, y, B + x)];
        step(OP_U, x, y, v, refm[ix(N2, J, B + x)], none);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
