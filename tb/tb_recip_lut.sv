// Testbench of the reciprocal table: every 16-bit divisor is applied and the
// output compared with Round(2^15 / (|u| >> 6)) (saturated to 32767, sign of
// u applied) computed here in integer arithmetic; a few values are also
// checked by hand (u = 1.0 gives 2^15/4 = 8192, u = -2.0 gives -4096).
module tb_recip_lut;
  import lu_pkg::*;
  import lu_ref_pkg::*;

  word_t u, recip;
  int checks = 0, failures = 0;

  recip_lut dut (.u(u), .recip(recip));

  task automatic check(word_t val, word_t exp);
    u = val;
    #1;
    checks++;
    if (recip !== exp) begin
      failures++;
      if (failures < 10) $display("u=%0d: got %0d expected %0d", val, recip, exp);
    end
  endtask

  initial begin
    check(word_t'(256), word_t'(8192));
    check(word_t'(-512), word_t'(-4096));
    check(word_t'(64 * 3), word_t'(10923));
    check(word_t'(10), word_t'(32767));
    for (int v = -32768; v < 32768; v++) check(word_t'(v), frecip(w16'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
