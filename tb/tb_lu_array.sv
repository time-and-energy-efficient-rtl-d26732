// Testbench of the LU linear array (b = 16 PEs, default size).
//
// Builds a 2b x 2b test matrix and factors it with the reference model; then
// drives the array with the same sequence the block sequencer uses for one
// iteration: opLU on block (0,0) immediately followed by a second opLU of
// another matrix (streaming), opLU of the first matrix again, opL on block
// (1,0) and opU on block (0,1) fed transposed, all back to back. Every result is
// compared with the reference, bit for bit, in order. Timing checks: the
// result lu(x,y) of the first matrix appears on lu_out exactly in cycle
// b(x-1) + y + b (a(1,1) entering in cycle 1), so the last one is produced in
// cycle b^2 + b - 1; the next matrix's results follow without a gap (one
// matrix every b^2 cycles).
module tb_lu_array;
  import lu_pkg::*;
  import lu_ref_pkg::*;

  localparam int B = 16;
  localparam int N2 = 2 * B;

  logic    clk = 0, rst_n = 0, en = 1;
  lu_tok_t a_in, lu_out;

  lu_array #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, s0 = 0;

  w16 orig [], refm [], ref2 [], orig2 [];

  typedef struct {lu_op_e op; int x; int y; w16 v;} drv_t;
  drv_t drv [$];
  w16   exp_q [$];
  int   exp_x [$], exp_y [$];
  int   nout = 0;

  function automatic void push_blk(lu_op_e op, w16 src [], int n, int r0, int c0, bit tr);
    for (int x = 0; x < B; x++)
      for (int y = 0; y < B; y++) begin
        drv_t d;
        d.op = op; d.x = x; d.y = y;
        d.v = tr ? src[ix(n, r0 + y, c0 + x)] : src[ix(n, r0 + x, c0 + y)];
        drv.push_back(d);
      end
  endfunction

  function automatic void push_exp(w16 src [], int n, int r0, int c0, bit tr);
    for (int x = 0; x < B; x++)
      for (int y = 0; y < B; y++) begin
        exp_q.push_back(tr ? src[ix(n, r0 + y, c0 + x)] : src[ix(n, r0 + x, c0 + y)]);
        exp_x.push_back(x);
        exp_y.push_back(y);
      end
  endfunction

  initial begin
    // reference results
    make_matrix(N2, 8 * 256, 128);
    orig = m;
    block_lu(N2, B);
    refm = m;
    make_matrix(B, 6 * 256, 200);
    orig2 = m;
    block_lu(B, B);
    ref2 = m;

    // matrix 1 opLU, matrix 2 opLU (streamed) -- then opLU of matrix 1 again
    // so that the storages and RegRs hold matrix 1 for its opL/opU.
    push_blk(OP_LU, orig, N2, 0, 0, 0);   push_exp(refm, N2, 0, 0, 0);
    push_blk(OP_LU, orig2, B, 0, 0, 0);   push_exp(ref2, B, 0, 0, 0);
    push_blk(OP_LU, orig, N2, 0, 0, 0);   push_exp(refm, N2, 0, 0, 0);
    push_blk(OP_L,  orig, N2, B, 0, 0);   push_exp(refm, N2, B, 0, 0);
    push_blk(OP_U,  orig, N2, 0, B, 1);   push_exp(refm, N2, 0, B, 1);
  end

  // drive one token per cycle
  task automatic drive_all();
    while (drv.size() > 0) begin
      drv_t d;
      d = drv.pop_front();
      a_in <= '{valid: 1'b1, op: d.op, x: idx_t'(d.x), y: idx_t'(d.y), data: d.v};
      @(posedge clk);
    end
    a_in <= '0;
  endtask

  initial begin
    a_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    s0 = cyc;
    drive_all();
    // opU right behind opL: the storages already hold the rows of L11,
    // copied from the LU chain during the last opLU
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    checks++;
    if (nout != 5 * B * B) begin failures++; $display("result count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // free-running cycle counter; cyc - s0 seen at a clock edge is the number
  // of the cycle that edge ends, cycle 1 being the one a(1,1) is on a_in
  always @(posedge clk) cyc <= cyc + 1;

  // monitor
  always @(posedge clk) begin
    if (rst_n && lu_out.valid) begin
      w16 e; int ex, ey;
      nout++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        e = exp_q.pop_front(); ex = exp_x.pop_front(); ey = exp_y.pop_front();
        checks++;
        if (lu_out.data !== e || int'(lu_out.x) != ex || int'(lu_out.y) != ey) begin
          failures++;
          if (failures < 10)
            $display("mismatch #%0d (%0d,%0d): got %0d at (%0d,%0d) exp %0d", nout, ex, ey,
                     lu_out.data, lu_out.x, lu_out.y, e);
        end
        // timing of the first matrix; +1: output is visible one cycle after it is produced
        if (nout <= B * B) begin
          checks++;
          if (cyc - s0 != B * ex + (ey + 1) + B) begin
            failures++;
            if (failures < 10) $display("timing (%0d,%0d): cycle %0d", ex, ey, cyc - s0);
          end
        end
        // streaming: second matrix right behind the first
        if (nout == 2 * B * B) begin
          checks++;
          if (cyc - s0 != 2 * B * B + B) begin
            failures++; $display("second matrix last result in cycle %0d", cyc - s0);
          end
        end
        if (nout == B * B) $display("last result of first matrix produced in cycle %0d (b^2+b-1 = %0d)",
                                    cyc - s0 - 1, B * B + B - 1);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
