// Testbench of the multiply/subtract array with b = 16 and r = 8 PEs (two
// column groups per operation), two operations back to back; see
// mms_stim.svh for the stimulus and the checks.
module tb_mms_array;
  import lu_pkg::*;
  import lu_ref_pkg::*;

  localparam int B = 16;
  localparam int R = 8;

  logic     clk = 0, rst_n = 0, en = 1;
  mms_tok_t t_in, t_out;

  always #5 clk = ~clk;

  mms_array #(.B(B), .R(R)) dut (.*);

  `include "mms_stim.svh"

  // A result is only ever attached to a valid token.
  initial checks++;
  always @(posedge clk)
    if (rst_n && t_out.res_valid && t_out.valid !== 1'b1) begin
      failures++;
      $display("result on an invalid token");
    end

endmodule
