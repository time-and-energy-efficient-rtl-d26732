// Common stimulus and checking for the multiply/subtract array testbenches.
// The including module declares B and R, the signals clk, rst_n, t_in, t_out,
// and instantiates the device so that t_in enters PE 0 and t_out leaves
// PE R-1.
//
// Two operations E = F - C x D on random B x B blocks are issued back to back:
// R preload tokens, then for each of the B/R column groups B steps of B tokens
// (C[i][k], i fastest). The first R tokens of a step carry the D row of the
// next step, or the first D row of the next group or of the next operation.
// After each group, the following R*B tokens carry its read-out requests (row
// rd_row of PE rd_slot, F element, write address = operation*B*B + row*B +
// column); idle tokens finish the last read-outs. Every result is compared
// with the reference E (same fixed-point order: sum over k ascending, then
// F - sum), and the cycle of the last result must be exactly
// R + 2 B^3/R + R*B + R (tokens issued plus R register stages).

  int checks = 0, failures = 0;
  w16 C [2][B][B], D [2][B][B], F [2][B][B], E [2][B][B];
  mms_tok_t toks [$];
  int      seen [2*B*B];
  longint  cyc = 0, s0 = 0, last_res = 0;

  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {int row; int slot; w16 f; int addr;} rd_t;

  task automatic build();
    rd_t rdq [$];
    for (int o = 0; o < 2; o++)
      for (int i = 0; i < B; i++)
        for (int c = 0; c < B; c++) begin
          C[o][i][c] = w16'(int'($urandom_range(1024)) - 512);
          D[o][i][c] = w16'(int'($urandom_range(1024)) - 512);
          F[o][i][c] = w16'(int'($urandom_range(4096)) - 2048);
        end
    for (int o = 0; o < 2; o++)
      for (int i = 0; i < B; i++)
        for (int c = 0; c < B; c++) begin
          w16 acc;
          acc = 0;
          for (int k = 0; k < B; k++) acc = acc + fmul(C[o][i][k], D[o][k][c]);
          E[o][i][c] = F[o][i][c] - acc;
        end
    // preload of the first step of operation 0, group 0
    for (int s = 0; s < R; s++) begin
      mms_tok_t t;
      t = '0;
      t.valid = 1; t.kind = MK_PRE; t.d_valid = 1; t.d_slot = idx_t'(s); t.d = D[0][0][s];
      toks.push_back(t);
    end
    for (int o = 0; o < 2; o++)
      for (int g = 0; g < B / R; g++) begin
        for (int k = 0; k < B; k++)
          for (int i = 0; i < B; i++) begin
            mms_tok_t t;
            t = '0;
            t.valid = 1; t.kind = MK_RUN; t.i = idx_t'(i); t.k = idx_t'(k); t.c = C[o][i][k];
            if (i < R) begin
              t.d_slot = idx_t'(i);
              if (k < B - 1) begin
                t.d_valid = 1; t.d = D[o][k+1][g*R + i];
              end else if (g < B / R - 1) begin
                t.d_valid = 1; t.d = D[o][0][(g+1)*R + i];
              end else if (o == 0) begin
                t.d_valid = 1; t.d = D[1][0][i];
              end
            end
            if (rdq.size() > 0) begin
              rd_t r;
              r = rdq.pop_front();
              t.rd_valid = 1; t.rd_slot = idx_t'(r.slot); t.rd_row = idx_t'(r.row);
              t.f = r.f; t.wb_addr = addr_t'(r.addr);
            end
            toks.push_back(t);
          end
        for (int row = 0; row < B; row++)
          for (int s = 0; s < R; s++) begin
            rd_t r;
            r.row = row; r.slot = s; r.f = F[o][row][g*R + s];
            r.addr = o*B*B + row*B + g*R + s;
            rdq.push_back(r);
          end
      end
    while (rdq.size() > 0) begin
      mms_tok_t t;
      rd_t r;
      r = rdq.pop_front();
      t = '0;
      t.valid = 1; t.kind = MK_IDLE;
      t.rd_valid = 1; t.rd_slot = idx_t'(r.slot); t.rd_row = idx_t'(r.row);
      t.f = r.f; t.wb_addr = addr_t'(r.addr);
      toks.push_back(t);
    end
  endtask

  always @(posedge clk) if (rst_n && t_out.valid && t_out.res_valid) begin
    int a, o, row, col;
    a = int'(t_out.wb_addr);
    o = a / (B*B); row = (a % (B*B)) / B; col = a % B;
    checks++;
    seen[a]++;
    last_res = cyc - s0;
    if (t_out.res !== E[o][row][col]) begin
      failures++;
      if (failures < 10) $display("E%0d(%0d,%0d): got %0d expected %0d", o, row, col,
                                  t_out.res, E[o][row][col]);
    end
  end

  initial begin
    int ntok;
    t_in = '0;
    build();
    ntok = toks.size();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    s0 = cyc;
    while (toks.size() > 0) begin
      t_in <= toks.pop_front();
      @(posedge clk);
    end
    t_in <= '0;
    repeat (R + 4) @(posedge clk);
    for (int a = 0; a < 2*B*B; a++) begin
      checks++;
      if (seen[a] != 1) begin
        failures++;
        if (failures < 10) $display("result %0d seen %0d times", a, seen[a]);
      end
    end
    checks++;
    $display("tokens %0d, last result in cycle %0d", ntok, last_res);
    if (ntok != R + 2*B*B*B/R + R*B || last_res != longint'(ntok + R)) begin
      failures++;
      $display("timing: expected %0d tokens and last result in cycle %0d", R + 2*B*B*B/R + R*B,
               R + 2*B*B*B/R + R*B + R);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
