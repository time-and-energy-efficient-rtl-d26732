// Testbench of one multiply/subtract PE used as an array of one (r = 1,
// b = 8): it computes all eight columns of E = F - C x D in turn, for two
// operations back to back; see mms_stim.svh for the stimulus and the checks.
module tb_mms_pe;
  import lu_pkg::*;
  import lu_ref_pkg::*;

  localparam int B = 8;
  localparam int R = 1;

  logic     clk = 0, rst_n = 0, en = 1;
  mms_tok_t t_in, t_out;

  always #5 clk = ~clk;

  mms_pe #(.B(B), .J(0)) dut (.*);

  `include "mms_stim.svh"

  // A result is only ever attached to a valid token.
  initial checks++;
  always @(posedge clk)
    if (rst_n && t_out.res_valid && t_out.valid !== 1'b1) begin
      failures++;
      $display("result on an invalid token");
    end

endmodule
