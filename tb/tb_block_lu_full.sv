// End-to-end testbench of the block LU engine at its default size: a 256 x 256
// matrix, block size b = 16 and sub-block size r = 16, the design's
// energy-optimal configuration. The checks are those of block_lu_tb_body.svh.
module tb_block_lu_full;
  import lu_pkg::*;
  import lu_ref_pkg::*;

  localparam int N = 256;
  localparam int B = 16;
  localparam int R = 16;

  `include "block_lu_tb_body.svh"

  block_lu_top dut (.*);

  // An array is only ever enabled while the engine is busy.
  initial checks++;
  always @(posedge clk)
    if (rst_n && (lu_active || mms_active) && busy !== 1'b1) begin
      failures++;
      $display("array enabled while the engine is idle");
    end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
