// Common body of the end-to-end testbenches of block_lu_top. The including
// module declares N, B, R and instantiates block_lu_top as dut with the ports
// declared here.
//
// Flow: a random diagonally heavy N x N matrix is written through the host
// port, start is pulsed, done is awaited, and the whole memory bank is read
// back and compared bit for bit with the reference model (lu_ref_pkg), which
// performs the same block algorithm in plain loops. As an independent sanity
// check, L x U is multiplied out in real arithmetic and compared with the
// input matrix. The run time from start to done is checked against the
// latency of the overlapped schedule, 3bn - 2b^2 + (nb^2/6r)(n/b-1)(2n/b-1)
// + b - 1, plus the bounded overheads of this implementation (per iteration:
// memory read latency and pipeline drains, r preload cycles, r*b read-out
// cycles of the last product). Each mechanism of the design is counted and
// must occur: opLU, opL, opU and opMMS operations, opMMS running while the LU
// array still works on opL/opU, the LU array disabled while only opMMS runs,
// D preload, back-to-back opMMS with D prefetched from the next operation,
// and read-out by idle tokens.

  logic  clk = 0, rst_n = 0, start = 0;
  logic  busy, done;
  logic  host_we = 0;
  addr_t host_addr = '0, host_raddr = '0;
  word_t host_wdata = '0, host_rdata;
  logic  lu_active, mms_active, mms_preload, mms_chain, mms_idle_readout;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_lu_tok = 0, n_l_tok = 0, n_u_tok = 0, n_mms_groups = 0;
  int n_overlap = 0, n_lu_disabled = 0, n_pre = 0, n_chain = 0, n_idle_rd = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.a_tok.valid) begin
      if (dut.a_tok.op == OP_LU) n_lu_tok++;
      if (dut.a_tok.op == OP_L)  n_l_tok++;
      if (dut.a_tok.op == OP_U)  n_u_tok++;
    end
    if (dut.m_tok.valid && dut.m_tok.kind == MK_RUN && dut.m_tok.i == idx_t'(B-1) &&
        dut.m_tok.k == idx_t'(B-1)) n_mms_groups++;
    if (dut.m_tok.valid && dut.m_tok.kind == MK_RUN && (dut.a_tok.op == OP_L || dut.a_tok.op == OP_U)
        && dut.a_tok.valid) n_overlap++;
    if (busy && !lu_active && mms_active) n_lu_disabled++;
    if (mms_preload) n_pre++;
    if (mms_chain) n_chain++;
    if (mms_idle_readout) n_idle_rd++;
  end

  task automatic count(string what, int n, int expected);
    checks++;
    $display("  %-44s %0d", what, n);
    if (expected >= 0 ? (n != expected) : (n == 0)) begin
      failures++;
      $display("  ** %s: %0d, expected %0d", what, n, expected);
    end
  endtask

  initial begin
    w16 orig [], refm [];
    longint t0, t1, ideal, bound;
    int nb, sum_mms, sum_ops;
    real maxerr;

    make_matrix(N, 8 * 256, 96);
    orig = m;
    block_lu(N, B);
    refm = m;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = 0; a < N * N; a++) begin
      host_we    <= 1'b1;
      host_addr  <= addr_t'(a);
      host_wdata <= orig[a];
      @(posedge clk);
    end
    host_we <= 1'b0;
    @(posedge clk);

    start <= 1'b1;
    @(posedge clk);
    t0 = cyc;
    start <= 1'b0;
    @(posedge clk iff done);
    t1 = cyc;
    @(posedge clk);

    // read back and compare
    for (int a = 0; a < N * N; a++) begin
      host_raddr <= addr_t'(a);
      @(posedge clk);
      #1;
      checks++;
      if (host_rdata !== refm[a]) begin
        failures++;
        if (failures < 10)
          $display("mismatch at (%0d,%0d): got %0d expected %0d", a / N, a % N,
                   host_rdata, refm[a]);
      end
      @(negedge clk);
    end

    // sanity of the reference itself: L x U against the input, in reals
    maxerr = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real s;
        s = 0.0;
        for (int k = 0; k <= ((r < c) ? r : c); k++) begin
          real lv, uv;
          lv = (k == r) ? 1.0 : real'(refm[r*N + k]) / 256.0;
          uv = real'(refm[k*N + c]) / 256.0;
          s += lv * uv;
        end
        s -= real'(orig[r*N + c]) / 256.0;
        if (s < 0) s = -s;
        if (s > maxerr) maxerr = s;
      end
    checks++;
    $display("max |LU - A| = %f", maxerr);
    if (maxerr > 1.0) begin failures++; $display("reference factorisation inaccurate"); end

    // latency
    nb = N / B;
    sum_mms = 0;
    for (int k = 1; k <= nb; k++) sum_mms += (nb - k) * (nb - k);
    ideal = 3 * B * N - 2 * B * B + longint'(sum_mms) * B * B * B / R + B - 1;
    bound = ideal + longint'(nb) * (R + R * B + 2 * B + 24);
    checks++;
    $display("start to done: %0d cycles; overlapped schedule %0d; bound with overheads %0d",
             t1 - t0, ideal, bound);
    if (t1 - t0 > bound || t1 - t0 < ideal) begin
      failures++; $display("latency out of range");
    end

    // mechanisms
    sum_ops = 0;
    for (int k = 1; k <= nb; k++) sum_ops += nb - k;
    count("opLU elements",                      n_lu_tok, nb * B * B);
    count("opL elements",                       n_l_tok, sum_ops * B * B);
    count("opU elements",                       n_u_tok, sum_ops * B * B);
    count("opMMS column groups",                n_mms_groups, sum_mms * (B / R));
    count("cycles opMMS overlaps opL/opU",      n_overlap, -1);
    count("cycles LU array disabled",           n_lu_disabled, -1);
    count("D preload cycles",                   n_pre, -1);
    count("opMMS chained with D prefetch",      n_chain, -1);
    count("read-out cycles on idle tokens",     n_idle_rd, -1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
