// End-to-end testbench of the block LU engine at a reduced size: n = 64,
// b = 16, r = 8, so that every iteration has several opL/opU blocks, opMMS
// works in two column groups, and back-to-back opMMS operations occur. The
// checks are those of block_lu_tb_body.svh.
module tb_block_lu_top;
  import lu_pkg::*;
  import lu_ref_pkg::*;

  localparam int N = 64;
  localparam int B = 16;
  localparam int R = 8;

  `include "block_lu_tb_body.svh"

  block_lu_top #(.N(N), .B(B), .R(R)) dut (.*);

  // An array is only ever enabled while the engine is busy.
  initial checks++;
  always @(posedge clk)
    if (rst_n && (lu_active || mms_active) && busy !== 1'b1) begin
      failures++;
      $display("array enabled while the engine is idle");
    end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
