// One complete factorisation run of block_lu_top at a given size, for the
// workload testbench. When go rises it resets and loads a random diagonally
// heavy N x N matrix through the host port, pulses start, waits for done,
// reads the whole memory bank back and compares it bit for bit with the
// reference model (lu_ref_pkg), and checks the start-to-done time against
// the latency of the overlapped schedule,
// 3bn - 2b^2 + (nb^2/6r)(n/b-1)(2n/b-1) + b - 1, plus this implementation's
// bounded per-iteration overheads. It then raises finished and holds its
// counts on checks and failures. Runs of different sizes must not overlap in
// time: the reference model keeps its matrix in one shared variable.
module block_lu_run
  import lu_pkg::*;
  import lu_ref_pkg::*;
#(
  parameter int N = 32,
  parameter int B = 16,
  parameter int R = 16
) (
  input  logic clk,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output longint cycles
);

  logic  rst_n = 0, start = 0;
  logic  busy, done;
  logic  host_we = 0;
  addr_t host_addr = '0, host_raddr = '0;
  word_t host_wdata = '0, host_rdata;
  logic  lu_active, mms_active, mms_preload, mms_chain, mms_idle_readout;

  block_lu_top #(.N(N), .B(B), .R(R)) dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    w16 orig [], refm [];
    longint t0, t1, ideal, bound;
    int nb, sum_mms;

    finished = 1'b0;
    checks   = 0;
    failures = 0;
    cycles   = 0;
    wait (go);

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
    cycles = t1 - t0;
    @(posedge clk);

    for (int a = 0; a < N * N; a++) begin
      host_raddr <= addr_t'(a);
      @(posedge clk);
      #1;
      checks++;
      if (host_rdata !== refm[a]) begin
        failures++;
        if (failures < 10)
          $display("n=%0d mismatch at (%0d,%0d): got %0d expected %0d", N, a / N, a % N,
                   host_rdata, refm[a]);
      end
      @(negedge clk);
    end

    nb = N / B;
    sum_mms = 0;
    for (int k = 1; k <= nb; k++) sum_mms += (nb - k) * (nb - k);
    ideal = 3 * B * N - 2 * B * B + longint'(sum_mms) * B * B * B / R + B - 1;
    bound = ideal + longint'(nb) * longint'(R + R * B + 2 * B + 24);
    checks++;
    $display("n=%0d b=%0d r=%0d: %0d cycles (%.1f us at 120 MHz); overlapped schedule %0d; bound %0d",
             N, B, R, t1 - t0, real'(t1 - t0) / 120.0, ideal, bound);
    if (t1 - t0 > bound || t1 - t0 < ideal) begin
      failures++;
      $display("n=%0d latency out of range", N);
    end
    finished = 1'b1;
  end

endmodule
