// Testbench of the memory bank (n = 8, 4 read ports, 2 write ports): random
// writes on both write ports (never to one address at once) and random reads
// on all read ports for 2000 cycles, each read compared with a model of the
// contents; read data must appear exactly one cycle after its address.
module tb_mem_bank;
  import lu_pkg::*;

  localparam int N = 8;
  localparam int NR = 4;
  localparam int NW = 2;

  logic  clk = 0;
  addr_t raddr [NR];
  word_t rdata [NR];
  logic  we    [NW];
  addr_t waddr [NW];
  word_t wdata [NW];

  mem_bank #(.N(N), .NR(NR), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t model [N*N];
  word_t exp_q [NR];

  initial begin
    for (int p = 0; p < NW; p++) begin we[p] = 0; waddr[p] = '0; wdata[p] = '0; end
    for (int p = 0; p < NR; p++) raddr[p] = '0;
    // fill
    for (int a = 0; a < N*N; a += 2) begin
      we[0] <= 1; waddr[0] <= addr_t'(a);   wdata[0] <= word_t'(a * 3 + 1);
      we[1] <= 1; waddr[1] <= addr_t'(a+1); wdata[1] <= word_t'(a * 5 + 2);
      model[a] = word_t'(a * 3 + 1); model[a+1] = word_t'(a * 5 + 2);
      @(posedge clk);
    end
    we[0] <= 0; we[1] <= 0;
    @(posedge clk);
    for (int c = 0; c < 2000; c++) begin
      int a0, a1;
      // reads of this cycle see the contents before this cycle's writes
      for (int p = 0; p < NR; p++) begin
        int ra;
        ra = $urandom_range(N*N-1);
        raddr[p] <= addr_t'(ra);
        exp_q[p] = model[ra];
      end
      a0 = $urandom_range(N*N-1);
      a1 = (a0 + 1 + $urandom_range(N*N-2)) % (N*N);
      we[0] <= ($urandom_range(1) == 1); waddr[0] <= addr_t'(a0); wdata[0] <= word_t'($urandom);
      we[1] <= ($urandom_range(1) == 1); waddr[1] <= addr_t'(a1); wdata[1] <= word_t'($urandom);
      @(posedge clk);
      if (we[0]) model[a0] = wdata[0];
      if (we[1]) model[a1] = wdata[1];
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== exp_q[p]) begin
          failures++;
          if (failures < 10) $display("port %0d: got %0d expected %0d", p, rdata[p], exp_q[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
