// Workload testbench: every problem size of the design's evaluation table
// except n = 256 (the full-size testbench), each a separate build of the
// engine with the block sizes used there: n = 8 and 16 with b = r = 8,
// n = 32, 64, 128, 512 and 1024 with b = r = 16.
// The runs follow each other; each checks every result word and the cycle
// count (see block_lu_run). The n = 1024 run takes about 22 million cycles,
// a couple of minutes of simulation.
module tb_block_lu_workloads;

  localparam int NRUN = 7;

  logic   clk = 0;
  logic   go [NRUN];
  logic   fin [NRUN];
  int     chk [NRUN], fail [NRUN];
  longint cyc [NRUN];
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  block_lu_run #(.N(8), .B(8), .R(8)) u_n8 (.clk, .go(go[0]), .finished(fin[0]),
      .checks(chk[0]), .failures(fail[0]), .cycles(cyc[0]));
  block_lu_run #(.N(16), .B(8), .R(8)) u_n16 (.clk, .go(go[1]), .finished(fin[1]),
      .checks(chk[1]), .failures(fail[1]), .cycles(cyc[1]));
  block_lu_run #(.N(32), .B(16), .R(16)) u_n32 (.clk, .go(go[2]), .finished(fin[2]),
      .checks(chk[2]), .failures(fail[2]), .cycles(cyc[2]));
  block_lu_run #(.N(64), .B(16), .R(16)) u_n64 (.clk, .go(go[3]), .finished(fin[3]),
      .checks(chk[3]), .failures(fail[3]), .cycles(cyc[3]));
  block_lu_run #(.N(128), .B(16), .R(16)) u_n128 (.clk, .go(go[4]), .finished(fin[4]),
      .checks(chk[4]), .failures(fail[4]), .cycles(cyc[4]));
  block_lu_run #(.N(512), .B(16), .R(16)) u_n512 (.clk, .go(go[5]), .finished(fin[5]),
      .checks(chk[5]), .failures(fail[5]), .cycles(cyc[5]));
  block_lu_run #(.N(1024), .B(16), .R(16)) u_n1024 (.clk, .go(go[6]), .finished(fin[6]),
      .checks(chk[6]), .failures(fail[6]), .cycles(cyc[6]));


  initial begin
    for (int i = 0; i < NRUN; i++) go[i] = 1'b0;
    for (int i = 0; i < NRUN; i++) begin
      go[i] = 1'b1;
      wait (fin[i] === 1'b1);
      checks   += chk[i];
      failures += fail[i];
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
